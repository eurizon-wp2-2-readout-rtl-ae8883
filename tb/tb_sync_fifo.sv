// tb_sync_fifo: random push/pop traffic against a queue model.
//
// Pops are only requested when the FIFO reports data. The testbench checks every popped word,
// the empty/full flags and count after each clock, and that a push into a full FIFO is dropped
// and counted (the writer is driven hard for a while with no reads to force this).
module tb_sync_fifo;
  localparam int W = 64, D = 16;

  logic clk = 0, rst_n = 0, wr_en = 0, rd_en = 0;
  logic [W-1:0] wr_data, rd_data;
  logic empty, full;
  logic [$clog2(D+1)-1:0] count;
  logic [15:0] ovf;
  logic [W-1:0] model [$];
  int exp_ovf = 0;
  int checks = 0, failures = 0;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.clk, .rst_n, .wr_en, .wr_data, .rd_en, .rd_data,
                                         .empty, .full, .count, .overflow_cnt(ovf));

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(int wr_pct, int rd_pct);
    bit do_rd, do_wr;
    wr_en   = ($urandom_range(0, 99) < wr_pct);
    wr_data = {$urandom, $urandom};
    rd_en   = !empty && ($urandom_range(0, 99) < rd_pct);
    do_rd   = rd_en;
    if (do_rd) begin
      checks++;
      if (rd_data != model[0]) begin failures++; $display("data %h exp %h", rd_data, model[0]); end
      void'(model.pop_front());
    end
    do_wr = wr_en && (model.size() < D || do_rd);
    if (do_wr) model.push_back(wr_data);
    else if (wr_en) exp_ovf++;
    @(negedge clk);
    checks++;
    if (int'(count) != model.size() || empty != (model.size() == 0) || full != (model.size() == D)
        || int'(ovf) != exp_ovf) begin
      failures++;
      $display("count %0d/%0d empty %b full %b ovf %0d/%0d", count, model.size(), empty, full, ovf, exp_ovf);
    end
  endtask

  initial begin
    wr_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    repeat (2000) step(50, 50);
    repeat (100) step(90, 0);     // fill and overflow
    repeat (2000) step(60, 60);
    repeat (100) step(0, 100);    // drain
    checks++;
    if (exp_ovf == 0) begin failures++; $display("overflow never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
