// tb_sync_reinit: the synchronization test of the chain, with board re-initializations.
//
// The TFC model runs without interruption while GBTxEMU alone, GERI alone, and then both boards
// are re-initialized through their own resets. After each re-initialization the GBTxEMU marker
// capture is re-enabled over Wishbone and a series of markers is read from the marker FIFO. The
// time signal reaches the deserializer model D = 13 samples late, with every edge moved by a
// random -1, 0 or +1 sample (about +-1 ns of jitter). Required after every re-initialization:
// both time counters locked again; every marker phase within one sample of the phase measured
// at the start; and the marker time modulo 2^10 (the total latency of the time distribution)
// exactly as at the start. A GERI re-initialization must also show up as resyncs in GBTxEMU,
// because GERI briefly sends wrong time until it has reloaded from the TFC.
module tb_sync_reinit;
  import readout_pkg::*;

  localparam int MB = 10;
  localparam int D  = 13;

  logic clk = 0, rst_n = 0, geri_rst_n = 1, emu_rst_n = 1;
  logic frame_stb;
  logic [FRAME_W-1:0] tfc_frame, geri_rx, geri_dl, emu_rx;
  logic tfc_sig;
  logic [TIME_W-1:0] tfc_time, geri_time, emu_time;
  logic geri_locked, emu_locked;
  logic [15:0] geri_resyncs, emu_resyncs, dbuf_ovf;
  logic dma_valid;
  logic [255:0] dma_data;
  logic [31:0] slice;
  logic [3:0] conc_fill;
  wb_req_t geri_req = '0, emu_req = '0;
  wb_rsp_t geri_rsp, emu_rsp;
  logic [TIME_LSB-1:0] emu_payload;
  logic [7:0] sync_data = '0;
  logic emu_marker;

  readout_chain_top dut (
    .clk, .rst_n, .geri_rst_n_i(geri_rst_n), .emu_rst_n_i(emu_rst_n), .frame_stb_o(frame_stb),
    .tfc_mark_bit_i(6'd0), .tfc_payload_i(24'h0), .tfc_dl_frame_o(tfc_frame),
    .tfc_time_sig_o(tfc_sig), .tfc_time_o(tfc_time),
    .geri_tfc_valid_i(1'b1), .geri_tfc_frame_i(geri_rx), .geri_dl_payload_i(24'h0),
    .geri_dl_frame_o(geri_dl), .geri_time_o(geri_time), .geri_locked_o(geri_locked),
    .geri_resync_cnt_o(geri_resyncs),
    .hit_valid_i('0), .hit_data_i('0), .dma_valid_o(dma_valid), .dma_ready_i(1'b1),
    .dma_data_o(dma_data), .slice_o(slice), .dbuf_overflow_o(dbuf_ovf), .conc_fill_o(conc_fill),
    .geri_wb_i(geri_req), .geri_wb_o(geri_rsp),
    .emu_dl_valid_i(1'b1), .emu_dl_frame_i(emu_rx), .emu_dl_payload_o(emu_payload),
    .emu_time_o(emu_time), .emu_locked_o(emu_locked), .emu_resync_cnt_o(emu_resyncs),
    .emu_sync_in_data_i(sync_data), .emu_marker_o(emu_marker),
    .emu_wb_i(emu_req), .emu_wb_o(emu_rsp));

  always #4 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL at %0t: %s", $time, msg);
    end
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // GBT links: 3 frames TFC->GERI, 2 frames GERI->GBTxEMU
  logic [FRAME_W-1:0] pipe1 [3], pipe2 [2];
  always @(posedge clk) if (frame_stb) begin
    pipe1[0] <= tfc_frame; pipe1[1] <= pipe1[0]; pipe1[2] <= pipe1[1];
    pipe2[0] <= geri_dl;   pipe2[1] <= pipe2[0];
  end
  assign geri_rx = pipe1[2];
  assign emu_rx  = pipe2[1];

  // LVDS cable with jitter and the 960 MHz deserializer
  longint cyc = 0;
  bit hist [8];
  int jit [8];
  always @(negedge clk) begin
    cyc++;
    hist[cyc % 8] = tfc_sig;
    jit[cyc % 8]  = (hist[cyc % 8] != hist[(cyc - 1) % 8]) ? int'($urandom_range(0, 2)) - 1 : 0;
    for (int k = 0; k < 8; k++) begin
      longint s, c;
      int r;
      bit v;
      s = cyc * 8 + k - D;
      c = s / 8;
      r = int'(s % 8);
      v = hist[c % 8];
      // edge at the start of cycle c moved later by +1: first sample still old
      if (jit[c % 8] == 1 && r == 0) v = hist[(c - 1) % 8];
      // edge at the start of cycle c+1 moved earlier by -1: last sample already new
      if (jit[(c + 1) % 8] == -1 && r == 7) v = hist[(c + 1) % 8];
      sync_data[k] = (s >= 16) ? v : 1'b0;
    end
  end

  task automatic wb(bit emu, bit we, logic [7:0] adr, logic [31:0] wdat, output logic [31:0] rdat);
    wb_req_t r;
    r = '{cyc: 1'b1, stb: 1'b1, we: we, adr: adr, dat: wdat};
    if (emu) emu_req = r; else geri_req = r;
    do @(posedge clk); while (!(emu ? emu_rsp.ack : geri_rsp.ack));
    rdat = emu ? emu_rsp.dat : geri_rsp.dat;
    @(negedge clk);
    if (emu) emu_req = '0; else geri_req = '0;
    @(negedge clk);
  endtask

  int ref_phase = -1, ref_offset = -1, measured = 0;

  // re-enable capture, wait for n markers, read them all and compare with the reference
  task automatic measure(int n, string when);
    logic [31:0] d, hi, lo;
    wb(1, 1, REG_CTRL, 1, d);
    repeat (n * 3 * (1 << MB) + 200) @(negedge clk);
    wb(1, 0, REG_STATUS, 0, d);
    check(int'(d[15:8]) >= n - 1, $sformatf("%s: %0d markers", when, d[15:8]));
    for (int i = 0; i < int'(d[15:8]); i++) begin
      int ph, off, dph;
      wb(1, 0, REG_MARK_HI, 0, hi);
      wb(1, 0, REG_MARK_LO, 0, lo);
      ph  = int'(hi[28:24]);
      off = int'(lo[MB-1:0]);
      if (ref_phase < 0) begin ref_phase = ph; ref_offset = off; end
      dph = (ph - ref_phase + 24) % 24;
      check(dph <= 1 || dph == 23, $sformatf("%s: phase %0d, reference %0d", when, ph, ref_phase));
      check(off == ref_offset, $sformatf("%s: latency %0d frames, reference %0d", when, off, ref_offset));
      measured++;
    end
    check(geri_locked && emu_locked, $sformatf("%s: both counters locked", when));
  endtask

  initial begin
    int emu_rs;
    repeat (5) @(negedge clk);
    rst_n = 1;
    repeat (100) @(negedge clk);
    measure(6, "start");
    // GBTxEMU alone
    emu_rst_n = 0; repeat (10) @(negedge clk); emu_rst_n = 1;
    repeat (30) @(negedge clk);
    check(emu_locked, "GBTxEMU relocked after its re-initialization");
    measure(6, "after GBTxEMU re-init");
    // GERI alone: GBTxEMU sees wrong time for a few frames and must resync
    emu_rs = int'(emu_resyncs);
    geri_rst_n = 0; repeat (10) @(negedge clk); geri_rst_n = 1;
    repeat (60) @(negedge clk);
    check(int'(emu_resyncs) > emu_rs, "GERI re-init seen by GBTxEMU as resync");
    measure(6, "after GERI re-init");
    // both
    geri_rst_n = 0; emu_rst_n = 0; repeat (10) @(negedge clk); geri_rst_n = 1; emu_rst_n = 1;
    repeat (60) @(negedge clk);
    measure(6, "after re-init of both");
    check(measured >= 20, "markers measured");
    $display("markers=%0d phase=%0d latency=%0d frames", measured, ref_phase, ref_offset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
