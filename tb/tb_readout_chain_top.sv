// tb_readout_chain_top: end-to-end run of the whole chain with every parameter at its default.
//
// Around the top the testbench provides what the chain connects to:
//  - two GBT links, modelled as pipelines of K1 (TFC->GERI) and K2 (GERI->GBTxEMU) frames;
//  - the LVDS cable and 960 MHz deserializer: the TFC time signal, delayed by D = 11 samples,
//    is cut into 8-sample words, one per clock;
//  - E-Link hit sources: eight uplinks, each word valid with probability 1/4, words numbered so
//    that every one is unique;
//  - a DMA sink that is ready 90 % of the time;
//  - Wishbone masters for both boards.
// Sequence: read ID/VER of both boards, set run on both, take data for 20000 frames, stop and
// restart GERI reception, then run one complete 4 000 000-tick time slice (12 million clocks)
// to its boundary and into the next slice, stop, and finally flood the stopped data path to
// overflow the data buffer. Along the way K2 is lengthened by two frames (a GBTxEMU resync),
// and marker reading is paused long enough to overflow the marker FIFO.
// Checks: packet structure, slice numbers and times (end = start + 4 000 000 at the boundary),
// every data word in order, every marker phase equal to the phase of the regular edges of the
// time signal, marker times spaced by 2^10 frames with exactly one shift of -2 at the link
// change, lock and resync counts, and that each mechanism happened at least once.
module tb_readout_chain_top;
  import readout_pkg::*;

  localparam int NL = 8, HW = 32, RW = NL * HW;
  localparam longint SLICE = 4_000_000;
  localparam int MB = 10;
  localparam int D = 11;

  logic clk = 0, rst_n = 0;
  logic frame_stb;
  logic [FRAME_W-1:0] tfc_frame, geri_rx, geri_dl, emu_rx;
  logic tfc_sig;
  logic [TIME_W-1:0] tfc_time, geri_time, emu_time;
  logic geri_locked, emu_locked;
  logic [15:0] geri_resyncs, emu_resyncs, dbuf_ovf;
  logic [NL-1:0] hit_valid = '0;
  logic [RW-1:0] hit_data = '0;
  logic dma_valid, dma_ready = 0;
  logic [RW-1:0] dma_data;
  logic [31:0] slice;
  logic [$clog2(NL+1)-1:0] conc_fill;
  wb_req_t geri_req = '0, emu_req = '0;
  wb_rsp_t geri_rsp, emu_rsp;
  logic [TIME_LSB-1:0] emu_payload;
  logic [7:0] sync_data = '0;
  logic emu_marker;

  readout_chain_top dut (
    .clk, .rst_n, .geri_rst_n_i(1'b1), .emu_rst_n_i(1'b1), .frame_stb_o(frame_stb),
    .tfc_mark_bit_i(6'd0), .tfc_payload_i(24'h00c0de), .tfc_dl_frame_o(tfc_frame),
    .tfc_time_sig_o(tfc_sig), .tfc_time_o(tfc_time),
    .geri_tfc_valid_i(1'b1), .geri_tfc_frame_i(geri_rx), .geri_dl_payload_i(24'h5a5a5a),
    .geri_dl_frame_o(geri_dl), .geri_time_o(geri_time), .geri_locked_o(geri_locked),
    .geri_resync_cnt_o(geri_resyncs),
    .hit_valid_i(hit_valid), .hit_data_i(hit_data), .dma_valid_o(dma_valid), .dma_ready_i(dma_ready),
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

  // ---------------------------------------------------------------- watchdog
  initial begin
    repeat (14_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- GBT link models
  int k1 = 3, k2 = 2;
  logic [FRAME_W-1:0] pipe1 [8], pipe2 [8];
  always @(posedge clk) if (frame_stb) begin
    pipe1[0] <= tfc_frame;
    pipe2[0] <= geri_dl;
    for (int i = 1; i < 8; i++) begin pipe1[i] <= pipe1[i-1]; pipe2[i] <= pipe2[i-1]; end
  end
  assign geri_rx = pipe1[k1-1];
  assign emu_rx  = pipe2[k2-1];

  // ---------------------------------------------------------------- LVDS + 960 MHz deserializer
  longint cyc = 0, stb_cyc = 0;
  bit hist [8];
  int edge_phase = -1;
  int phase_mismatch = 0;
  always @(negedge clk) begin
    cyc++;
    if (frame_stb) stb_cyc = cyc;
    hist[cyc % 8] = tfc_sig;
    if (cyc > 8 && hist[cyc % 8] != hist[(cyc - 1) % 8] && rst_n) begin
      int p;
      p = int'(((cyc - stb_cyc) * 8 + D) % 24);
      if (edge_phase < 0) edge_phase = p;
      else if (p != edge_phase) phase_mismatch++;
    end
    for (int k = 0; k < 8; k++) begin
      longint s;
      s = cyc * 8 + k - D;
      sync_data[k] = (s >= 0) ? hist[(s / 8) % 8] : 1'b0;
    end
  end

  // ---------------------------------------------------------------- E-Link hit sources
  bit hits_on = 0, lossy = 0;
  int unsigned word_no = 0;
  logic [HW-1:0] ref_q [$];
  always @(negedge clk) begin
    logic [NL-1:0] v;
    v = hits_on ? NL'($urandom & $urandom) : '0;
    hit_valid = v;
    for (int i = 0; i < NL; i++) begin
      hit_data[i*HW +: HW] = HW'(word_no) ^ 32'h2400_0000;
      if (v[i]) begin
        if (!lossy) ref_q.push_back(hit_data[i*HW +: HW]);
        word_no++;
      end
    end
    dma_ready = ($urandom_range(0, 9) != 0);
  end

  // ---------------------------------------------------------------- DMA stream parser
  int headers = 0, trailers = 0, datarows = 0, boundary_closes = 0, stop_closes = 0, stalls = 0;
  int fill_seen = 0;
  bit in_slice = 0, last_boundary = 0;
  longint cur_start = 0, last_end = 0, exp_slice = 0;
  always @(posedge clk) if (rst_n) begin
    if (conc_fill != 0) fill_seen++;
    if (dma_valid && !dma_ready) stalls++;
    if (dma_valid && dma_ready && !lossy) begin
      bit is_data;
      is_data = 0;
      if (in_slice && ref_q.size() >= NL) begin
        is_data = 1;
        for (int j = 0; j < NL; j++) if (dma_data[j*HW +: HW] != ref_q[j]) is_data = 0;
      end
      if (!in_slice) begin
        check(dma_data[31:0] == HDR_MAGIC && longint'(dma_data[63:32]) == exp_slice &&
              dma_data[RW-1:128] == '0, "header expected");
        cur_start = longint'(dma_data[127:64]);
        if (last_boundary) check(cur_start == last_end, "next slice must start at previous end");
        in_slice = 1; headers++;
      end else if (is_data) begin
        for (int j = 0; j < NL; j++) void'(ref_q.pop_front());
        datarows++;
      end else begin
        longint e;
        e = longint'(dma_data[127:64]);
        check(dma_data[31:0] == TRL_MAGIC && longint'(dma_data[63:32]) == exp_slice,
              $sformatf("trailer or data expected in slice %0d, got %h", exp_slice, dma_data[127:0]));
        if (e == cur_start + SLICE) begin boundary_closes++; last_boundary = 1; end
        else begin
          check(e >= cur_start && e < cur_start + SLICE, "stop time inside the slice");
          stop_closes++; last_boundary = 0;
        end
        last_end = e; in_slice = 0; trailers++; exp_slice++;
      end
    end
  end

  // ---------------------------------------------------------------- Wishbone masters
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

  int markers = 0, mfifo_ovf = 0, shifts = 0, pops = 0;
  longint last_mtime = -1;
  task automatic read_markers();
    logic [31:0] st, hi, lo;
    wb(1, 0, REG_STATUS, 0, st);
    if (st[31:16] != 0) mfifo_ovf = int'(st[31:16]);
    for (int i = 0; i < int'(st[15:8]); i++) begin
      longint t, d;
      wb(1, 0, REG_MARK_HI, 0, hi);
      wb(1, 0, REG_MARK_LO, 0, lo);
      pops++;
      t = longint'({hi[23:0], lo});
      check(int'(hi[28:24]) == edge_phase,
            $sformatf("marker phase %0d, edge phase %0d", hi[28:24], edge_phase));
      if (last_mtime >= 0) begin
        d = t - last_mtime;
        if (d % (1 << MB) != 0) begin
          shifts++;
          check((d + 2) % (1 << MB) == 0, $sformatf("marker time step %0d", d));
        end
      end
      last_mtime = t;
    end
  endtask

  always @(posedge clk) if (emu_marker) markers++;

  // ---------------------------------------------------------------- sequence
  initial begin
    logic [31:0] d;
    bit stopped = 0, restarted = 0, k2_changed = 0;
    int ovf0, geri_rs0, emu_rs0;
    repeat (5) @(negedge clk);
    rst_n = 1;
    repeat (40) @(negedge clk);
    wb(0, 0, REG_ID, 0, d);  check(d == 32'h1ed91fca, "GERI ID");
    wb(0, 0, REG_VER, 0, d); check(d == 32'hadd15038, "GERI VER");
    wb(1, 0, REG_ID, 0, d);  check(d == 32'h1ed91fca, "GBTxEMU ID");
    wb(1, 0, REG_VER, 0, d); check(d == 32'h52c6231d, "GBTxEMU VER");
    check(geri_locked && emu_locked, "both time counters locked");
    check(emu_payload == 24'h5a5a5a, "downlink payload passes to GBTxEMU");
    // lag per hop: one frame in the sender's frame register, k frames of link, one frame in
    // the receiver's counter register
    check(longint'(tfc_time) - longint'(geri_time) == k1 + 2 && longint'(geri_time) - longint'(emu_time) == k2 + 2,
          $sformatf("time lags %0d %0d", longint'(tfc_time) - longint'(geri_time),
                    longint'(geri_time) - longint'(emu_time)));
    geri_rs0 = int'(geri_resyncs);
    emu_rs0  = int'(emu_resyncs);
    check(geri_rs0 > 0 && emu_rs0 > 0, "counters loaded from the link");
    wb(1, 1, REG_CTRL, 1, d);
    wb(0, 1, REG_CTRL, 1, d);
    hits_on = 1;
    while (boundary_closes < 1 || headers < trailers + 1 || datarows < 200 || !restarted) begin
      repeat (30_000) @(negedge clk);
      if (!stopped && tfc_time > 20_000) begin
        wb(0, 1, REG_CTRL, 0, d); hits_on = 0; stopped = 1;
      end else if (stopped && !restarted && tfc_time > 21_000) begin
        wb(0, 1, REG_CTRL, 1, d); hits_on = 1; restarted = 1;
      end
      if (!k2_changed && tfc_time > 60_000) begin
        k2 = 4; k2_changed = 1;
      end
      if (tfc_time < 100_000 || tfc_time > 130_000) read_markers();
    end
    // stop reception: the open slice is closed with the current time
    wb(0, 1, REG_CTRL, 0, d);
    repeat (200) @(negedge clk);
    check(!in_slice, "slice closed after stop");
    read_markers();
    // flood the stopped data path: the data buffer must overflow
    lossy = 1;
    ovf0 = int'(dbuf_ovf);
    repeat (2000) begin
      @(negedge clk);
      hit_valid = '1;
    end
    check(int'(dbuf_ovf) > ovf0, "data buffer overflow counted");

    check(phase_mismatch == 0, "all time-signal edges at one phase");
    // lengthening the GERI->GBTxEMU link costs GBTxEMU exactly one resync and GERI none
    check(int'(emu_resyncs) == emu_rs0 + 1 && int'(geri_resyncs) == geri_rs0,
          $sformatf("resyncs geri %0d->%0d emu %0d->%0d", geri_rs0, geri_resyncs, emu_rs0, emu_resyncs));
    check(shifts == 1, $sformatf("%0d marker time shifts", shifts));
    check(markers > 100 && pops > 50, "markers measured and read");
    check(mfifo_ovf > 0, "marker FIFO overflow");
    check(boundary_closes >= 1 && stop_closes >= 2, "slice closes by boundary and by stop");
    check(stalls > 0, "DMA back-pressure");
    check(fill_seen > 0, "partial concentrator rows");
    $display("frames=%0d markers=%0d read=%0d mfifo_ovf=%0d headers=%0d trailers=%0d data=%0d boundary=%0d stop=%0d stalls=%0d dbuf_ovf=%0d resyncs=%0d/%0d",
             tfc_time, markers, pops, mfifo_ovf, headers, trailers, datarows, boundary_closes,
             stop_closes, stalls, dbuf_ovf, geri_resyncs, emu_resyncs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
