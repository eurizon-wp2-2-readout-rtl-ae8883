// tb_data_concentrator_n32: the 32-input configuration, otherwise as tb_data_concentrator:
// random sparse and dense traffic on all inputs against a queue model.
//
// Every valid input word is appended to a reference queue in input order (input 0 first).
// Each output row must hold the next N words of the queue, slot 0 first. Traffic runs at
// several densities, including all inputs valid every cycle, where one full row must come out
// every clock (full bandwidth). The fill level is compared with the model after every clock.
module tb_data_concentrator_n32;
  localparam int N = 32, W = 32;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] in_valid;
  logic [N*W-1:0] in_data;
  logic out_valid;
  logic [N*W-1:0] out_data;
  logic [$clog2(N+1)-1:0] fill;
  logic [W-1:0] model [$];
  int rows = 0, words_in = 0, pending = 0;
  int checks = 0, failures = 0;

  data_concentrator #(.N(N), .W(W)) dut (.clk, .rst_n, .in_valid, .in_data, .out_valid, .out_data, .fill_o(fill));

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      rows++;
      for (int j = 0; j < N; j++) begin
        checks++;
        if (model.size() == 0) begin failures++; $display("row with no words pending"); end
        else begin
          if (out_data[j*W +: W] != model[0]) begin
            failures++; $display("row %0d slot %0d: %h expected %h", rows, j, out_data[j*W +: W], model[0]);
          end
          void'(model.pop_front());
        end
      end
    end
  end

  task automatic drive(int pct, int cycles);
    for (int c = 0; c < cycles; c++) begin
      for (int i = 0; i < N; i++) begin
        in_valid[i]       = ($urandom_range(0, 99) < pct);
        in_data[i*W +: W] = $urandom;
        if (in_valid[i]) begin model.push_back(in_data[i*W +: W]); words_in++; end
      end
      @(negedge clk);
      // after this clock: words still waiting inside = model size minus the row just emitted
      checks++;
      if (int'(fill) != (words_in % N)) begin failures++; $display("fill %0d expected %0d pct=%0d c=%0d v=%h", fill, words_in % N, pct, c, in_valid); end
    end
  endtask

  initial begin
    int rows0;
    in_valid = '0; in_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    drive(5, 500);
    drive(30, 500);
    drive(70, 500);
    // full-rate: N words per clock give one row per clock
    in_valid = '0;
    @(negedge clk);            // let the last row of the previous phase leave
    rows0 = rows;
    drive(100, 100);
    in_valid = '0;
    @(posedge clk); #1;
    checks++;
    if (rows - rows0 != 100) begin failures++; $display("full rate: %0d rows in 100 clocks", rows - rows0); end
    @(negedge clk);
    drive(50, 500);
    in_valid = '0;
    repeat (3) @(negedge clk);
    checks++;
    if (model.size() != int'(fill)) begin failures++; $display("left %0d words, fill %0d", model.size(), fill); end
    $display("rows=%0d words=%0d", rows, words_in);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
