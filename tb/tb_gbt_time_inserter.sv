// tb_gbt_time_inserter: checks that the time counter lands in frame[79:24] and the payload in
// frame[23:0], that the frame is taken only on the frame strobe and held in between.
module tb_gbt_time_inserter;
  import readout_pkg::*;

  logic clk = 0, rst_n = 0, frame_stb = 0;
  logic [TIME_LSB-1:0] payload;
  logic [TIME_W-1:0]   tval;
  logic [FRAME_W-1:0]  frame;
  logic [TIME_LSB-1:0] exp_pl;
  logic [TIME_W-1:0]   exp_t;
  int checks = 0, failures = 0;

  gbt_time_inserter dut (.clk, .rst_n, .frame_stb, .payload_i(payload), .time_i(tval), .frame_o(frame));

  always #5 clk = ~clk;

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    payload = '0; tval = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (frame != '0) failures++;
    for (int i = 0; i < 200; i++) begin
      payload   = TIME_LSB'($urandom);
      tval      = {24'($urandom), 32'($urandom)};
      frame_stb = 1;
      exp_pl    = payload;
      exp_t     = tval;
      @(negedge clk);
      frame_stb = 0;
      checks++;
      if (frame[79:24] != exp_t || frame[23:0] != exp_pl) begin
        failures++; $display("frame %h, expected time %h payload %h", frame, exp_t, exp_pl);
      end
      // inputs change between strobes: the frame must hold
      payload = ~payload; tval = ~tval;
      @(negedge clk);
      @(negedge clk);
      checks++;
      if (frame != {exp_t, exp_pl}) begin failures++; $display("frame did not hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
