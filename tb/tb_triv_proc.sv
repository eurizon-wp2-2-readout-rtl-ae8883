// tb_triv_proc: time-slice packetizer with random input traffic and random output stalls.
//
// The time counter advances once every three clocks; SLICE_LEN is cut to 40 ticks. The output
// stream is parsed: it must be header, data rows, trailer, header, ... with the magic words in
// word0, consecutive slice numbers, a header time equal to the previous trailer's end time
// after a boundary, end time = start time + SLICE_LEN for slices closed by the boundary, and
// data rows equal, in order, to the rows the block accepted. The sink stalls across each
// boundary so that the exact end time is tested against a later current time. Clearing run mid-slice must close
// the slice with the current time, and nothing may come out while run is low.
module tb_triv_proc;
  import readout_pkg::*;
  localparam int RW = 256, LEN = 40;

  logic clk = 0, rst_n = 0, run = 0;
  logic [TIME_W-1:0] tval = '0;
  logic s_valid = 0, s_ready, m_valid, m_ready = 0;
  logic [RW-1:0] s_data = '0, m_data;
  logic [31:0] slice;
  logic [RW-1:0] accepted [$];
  int checks = 0, failures = 0;
  int headers = 0, trailers = 0, datarows = 0, boundary_closes = 0, stop_closes = 0, stalls = 0;
  bit in_slice = 0;
  longint cur_start, last_end = -1, exp_slice = 0;
  bit last_was_boundary = 0;

  triv_proc #(.ROW_W(RW), .SLICE_LEN(LEN)) dut (
    .clk, .rst_n, .run, .time_i(tval), .s_valid, .s_ready, .s_data, .m_valid, .m_ready,
    .m_data, .slice_o(slice));

  always #5 clk = ~clk;

  initial begin
    #3_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // time counter: one tick per three clocks
  int sub = 0;
  always @(posedge clk) begin
    sub <= (sub == 2) ? 0 : sub + 1;
    if (sub == 2) tval <= tval + 1'b1;
  end

  // output parser
  always @(posedge clk) if (rst_n) begin
    if (s_valid && s_ready) accepted.push_back(s_data);
    if (m_valid && !m_ready) stalls++;
    if (m_valid && m_ready) begin
      checks++;
      if (!in_slice) begin
        if (m_data[31:0] != HDR_MAGIC || longint'(m_data[63:32]) != exp_slice || m_data[RW-1:128] != '0) begin
          failures++; $display("expected header for slice %0d, got %h", exp_slice, m_data[127:0]);
        end
        cur_start = longint'(m_data[127:64]);
        if (last_was_boundary && cur_start != last_end) begin
          failures++; $display("header time %0d, previous end %0d", cur_start, last_end);
        end
        in_slice = 1; headers++;
      end else if (accepted.size() > 0 && m_data == accepted[0]) begin
        void'(accepted.pop_front());
        datarows++;
      end else begin
        longint e;
        e = longint'(m_data[127:64]);
        if (m_data[31:0] != TRL_MAGIC || longint'(m_data[63:32]) != exp_slice) begin
          failures++; $display("bad row in slice %0d: %h", exp_slice, m_data[127:0]);
        end else if (accepted.size() != 0) begin
          failures++; $display("trailer while %0d accepted rows are unsent", accepted.size());
        end
        if (e == cur_start + LEN) begin boundary_closes++; last_was_boundary = 1; end
        else if (e < cur_start + LEN && e >= cur_start) begin stop_closes++; last_was_boundary = 0; end
        else begin failures++; $display("end time %0d for start %0d", e, cur_start); end
        last_end = e;
        in_slice = 0; trailers++; exp_slice++;
      end
    end
  end

  // random source and sink
  always @(negedge clk) begin
    if (!s_valid || s_ready) begin
      s_valid <= ($urandom_range(0, 99) < 40);
      s_data  <= {8{$urandom}};
    end
    // stall the sink across every slice boundary, so the trailer leaves several ticks late and
    // its end time must still be start + SLICE_LEN
    if (in_slice && longint'(tval) - cur_start >= LEN - 1 && longint'(tval) - cur_start <= LEN + 4)
      m_ready <= 1'b0;
    else
      m_ready <= ($urandom_range(0, 99) < 80);
  end

  initial begin
    int outs;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    run = 1;
    repeat (1000) @(negedge clk);          // about 8 slices closed by the boundary
    run = 0;                               // stop mid-slice
    repeat (30) @(negedge clk);
    outs = headers + trailers + datarows;
    repeat (200) @(negedge clk);
    checks++;
    if (headers + trailers + datarows != outs) begin failures++; $display("output while stopped"); end
    run = 1;
    repeat (500) @(negedge clk);
    run = 0;
    repeat (50) @(negedge clk);
    checks++;
    if (boundary_closes < 8 || stop_closes < 2 || headers != trailers || datarows < 100 || stalls == 0) begin
      failures++;
    end
    $display("headers=%0d trailers=%0d data=%0d boundary=%0d stop=%0d stalls=%0d",
             headers, trailers, datarows, boundary_closes, stop_closes, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
