// tb_time_marker_rx: drives the receiver with a synthetic 960 MHz-sampled time signal.
//
// The testbench builds the TFC time signal itself: the level of frame f is f[0] ^ f[N] (N = 4,
// so a marker every 16 frames) and the edge that starts frame f sits at sample
// f*24 + D + e(f), with D a delay in samples and e(f) an optional jitter of -1..+1 samples.
// Sample s is bit s%8 of the word given in clock s/8, and a frame strobe marks every clock with
// (s/8)%3 == 0, so a sample's phase is s%24. For every long level the testbench computes the
// expected centre phase from its own edge positions and checks the reported phase, the count
// of markers, and that successive recorded time values are 16 frames apart. It also checks
// that nothing is reported while enable is low. Several delays are run with and without jitter.
module tb_time_marker_rx;
  import readout_pkg::*;

  localparam int NB = 4;
  localparam int NFRAMES = 400;

  logic clk = 0, rst_n = 0, frame_stb = 0, enable = 0;
  logic [7:0] data;
  logic [TIME_W-1:0] tval;
  logic rec_valid;
  logic [PHASE_W-1:0] rec_phase;
  logic [TIME_W-1:0] rec_time;
  int checks = 0, failures = 0;

  int edge_pos [NFRAMES + 2];
  int exp_phase [$];
  int got = 0;
  longint last_time;

  time_marker_rx dut (.clk, .rst_n, .frame_stb, .enable, .sync_in_data(data), .time_i(tval),
                      .rec_valid_o(rec_valid), .rec_phase_o(rec_phase), .rec_time_o(rec_time));

  always #5 clk = ~clk;

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit lvl(int f);
    return bit'(f[0] ^ f[NB]);
  endfunction

  function automatic bit sample_at(int s);
    for (int f = NFRAMES; f >= 0; f--)
      if (s >= edge_pos[f]) return lvl(f);
    return lvl(0) ^ 1'b1;
  endfunction

  always @(posedge clk) begin
    if (rec_valid) begin
      checks++;
      if (exp_phase.size() == 0) begin
        failures++; $display("unexpected marker phase %0d", rec_phase);
      end else begin
        int e;
        e = exp_phase.pop_front();
        if (int'(rec_phase) != e) begin failures++; $display("phase %0d expected %0d", rec_phase, e); end
      end
      if (got > 0) begin
        checks++;
        if (longint'(rec_time) - last_time != (1 << NB)) begin
          failures++; $display("time step %0d", longint'(rec_time) - last_time);
        end
      end
      last_time = longint'(rec_time);
      got++;
    end
  end

  task automatic run_case(int d, bit jitter, bit en);
    int s0;
    exp_phase.delete();
    got = 0;
    for (int f = 0; f <= NFRAMES + 1; f++)
      edge_pos[f] = f * 24 + d + (jitter && f > 2 ? int'($urandom_range(0, 2)) - 1 : 0);
    // expected markers: a level lasting two frames (f and f+1 equal)
    for (int f = 1; f + 2 <= NFRAMES; f++) begin
      if (lvl(f) == lvl(f + 1) && lvl(f - 1) != lvl(f)) begin
        int len, centre;
        len    = edge_pos[f + 2] - edge_pos[f];
        centre = edge_pos[f] + len / 2;
        if (en) exp_phase.push_back(centre % 24);
      end
    end
    rst_n = 0; enable = en; frame_stb = 0; data = '0; tval = '0;
    @(negedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int c = 0; c * 8 < NFRAMES * 24; c++) begin
      frame_stb = (c % 3 == 0);
      if (c % 3 == 0) tval = TIME_W'(c / 3);
      for (int k = 0; k < 8; k++) data[k] = sample_at(c * 8 + k);
      @(negedge clk);
    end
    frame_stb = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (exp_phase.size() != 0) begin
      failures++; $display("d=%0d jitter=%0d: %0d markers missed", d, jitter, exp_phase.size());
    end
    if (en) begin
      checks++;
      if (got < NFRAMES / (1 << NB) - 2) begin failures++; $display("too few markers %0d", got); end
    end
    $display("d=%0d jitter=%0d enable=%0d: %0d markers", d, jitter, en, got);
  endtask

  initial begin
    run_case(0, 0, 1);
    run_case(7, 0, 1);
    run_case(13, 0, 1);
    run_case(23, 0, 1);
    run_case(5, 1, 1);
    run_case(18, 1, 1);
    run_case(9, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
