// tb_tfc_time_marker_gen: checks the TFC time counter and the time signal with its markers.
//
// A frame strobe every third clock advances the counter. After every strobe the testbench
// compares the counter with its own count, and the time signal with lowest-bit-XOR-bit-N
// computed from that count. It also measures the time signal's level lengths: every level must
// last one frame, except the one around each change of bit N, which must last two frames and
// must appear exactly every 2^N frames. Both the default bit (N = 10, selected by 0) and N = 4
// are exercised.
module tb_tfc_time_marker_gen;
  import readout_pkg::*;

  logic clk = 0, rst_n = 0, frame_stb = 0;
  logic [5:0] sel;
  logic [TIME_W-1:0] t;
  logic sig;
  int checks = 0, failures = 0;

  tfc_time_marker_gen dut (.clk, .rst_n, .frame_stb, .mark_bit_sel(sel), .time_o(t), .time_sig_o(sig));

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_frames(int nbit, int frames);
    int run_len, marks, last_mark, prev_sig;
    run_len = 0; marks = 0; last_mark = -1; prev_sig = -1;
    for (int f = 0; f < frames; f++) begin
      @(negedge clk) frame_stb = 1;
      @(negedge clk) frame_stb = 0;
      checks++;
      if (t != TIME_W'(f + 1)) begin failures++; $display("count %0d exp %0d", t, f + 1); end
      checks++;
      if (sig != (((f + 1) & 1) ^ (((f + 1) >> nbit) & 1))) begin
        failures++; $display("sig wrong at t=%0d", f + 1);
      end
      if (prev_sig == int'(sig)) run_len++;
      else begin
        if (prev_sig != -1 && f > 1) begin
          checks++;
          if (run_len == 2) begin
            // the long level straddles the frame in which bit N changed
            marks++;
            if (last_mark != -1 && (f - last_mark) != (1 << nbit)) begin
              failures++; $display("marker spacing %0d", f - last_mark);
            end
            last_mark = f;
          end else if (run_len != 1) begin
            failures++; $display("level length %0d", run_len);
          end
        end
        run_len = 1;
      end
      prev_sig = int'(sig);
      @(negedge clk);
    end
    checks++;
    if (marks < frames / (1 << nbit) - 1) begin failures++; $display("only %0d markers", marks); end
    $display("N=%0d: %0d markers in %0d frames", nbit, marks, frames);
  endtask

  initial begin
    sel = 6'd0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_frames(10, 4200);
    rst_n = 0; sel = 6'd4;
    @(negedge clk); rst_n = 1;
    run_frames(4, 200);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
