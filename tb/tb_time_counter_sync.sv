// tb_time_counter_sync: checks the local time counter against the time received in frames.
//
// A frame strobe comes every third clock. The testbench plays a remote counter and sends its
// value in frame[79:24]. Phases: (1) valid link, consistent count: time_o follows the remote
// value and locked_o is high with no resync; (2) the remote counter jumps: exactly one resync
// is counted and the local counter takes the new value; (3) the link drops: the counter
// free-runs by one per frame and locked_o is low; (4) the link returns with a consistent value.
module tb_time_counter_sync;
  import readout_pkg::*;

  logic clk = 0, rst_n = 0, frame_stb = 0, rx_valid = 0;
  logic [FRAME_W-1:0] frame;
  logic [TIME_W-1:0]  t;
  logic locked;
  logic [15:0] resyncs;
  longint remote;
  int checks = 0, failures = 0;

  time_counter_sync dut (.clk, .rst_n, .frame_stb, .rx_valid_i(rx_valid), .rx_frame_i(frame),
                         .time_o(t), .locked_o(locked), .resync_cnt_o(resyncs));

  always #5 clk = ~clk;

  initial begin
    #200_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one_frame(bit valid);
    rx_valid  = valid;
    frame     = {TIME_W'(remote), TIME_LSB'($urandom)};
    frame_stb = 1;
    @(negedge clk);
    frame_stb = 0;
    @(negedge clk);
    @(negedge clk);
  endtask

  initial begin
    frame = '0;
    remote = 64'h0000_0012_3456_0000;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // (1) first valid frame loads the counter: one resync, then steady lock
    one_frame(1);
    checks++; if (t != TIME_W'(remote) || resyncs != 16'd1) begin failures++; $display("load failed"); end
    for (int i = 0; i < 50; i++) begin
      remote++;
      one_frame(1);
      checks++;
      if (t != TIME_W'(remote) || !locked || resyncs != 16'd1) begin
        failures++; $display("track failed t=%h remote=%h locked=%b", t, remote, locked);
      end
    end
    // (2) jump
    remote += 1000;
    one_frame(1);
    checks++;
    if (t != TIME_W'(remote) || locked || resyncs != 16'd2) begin failures++; $display("jump not caught"); end
    remote++;
    one_frame(1);
    checks++; if (!locked) begin failures++; $display("no relock"); end
    // (3) link lost: free-run
    for (int i = 0; i < 10; i++) begin
      remote++;
      one_frame(0);
      checks++;
      if (t != TIME_W'(remote) || locked) begin failures++; $display("free-run wrong"); end
    end
    // (4) link back, consistent
    remote++;
    one_frame(1);
    checks++;
    if (t != TIME_W'(remote) || !locked || resyncs != 16'd2) begin failures++; $display("return wrong"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
