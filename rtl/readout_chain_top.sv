// readout_chain_top: digital core of the GERI / GBTxEMU readout chain with its TFC model.
//
// Three boards are modelled side by side on one 120 MHz clock; a mod-3 counter gives the
// 40 MHz frame strobe that stands for the recovered reference clock, already synchronized on
// all boards by the clock-recovery and jitter-cleaning hardware (outside this RTL).
//
//  TFC model:  time counter -> LVDS time signal with a marker every 2^N frames (tfc_time_sig_o)
//              time counter -> frame[79:24] of its GBT frame (tfc_dl_frame_o)
//  GERI:       time_counter_sync follows the time in the frame from the TFC (geri_tfc_frame_i)
//              and re-sends its own time in frame[79:24] of the downlink (geri_dl_frame_o);
//              hit words of N_LINKS uplinks -> data_concentrator -> sync_fifo data buffer ->
//              triv_proc time-slice packets -> DMA stream (dma_*); wb_csr with ID/VER and
//              ctrl.run, reached through geri_wb_*.
//  GBTxEMU:    time_counter_sync follows the time in the downlink (emu_dl_frame_i);
//              time_marker_rx measures the marker in the 960 MHz samples (emu_sync_in_data_i)
//              -> sync_fifo of {phase, time} records -> wb_csr (emu_wb_*).
// The GBT links, the LVDS deserializer, the E-Link receivers, the DMA engine and the PCIe
// bridge are not part of this RTL; their signals are the ports of this module.
//
// rst_n resets everything; geri_rst_n_i and emu_rst_n_i re-initialize one board while the rest
// keeps running.
//
// The partition into boards and the flow of time and data follow the document; the single
// clock with a frame strobe, the per-board resets, the data-buffer and marker-FIFO depths and the port set are this
// design's choices.
module readout_chain_top
  import readout_pkg::*;
#(
  parameter int unsigned N_LINKS     = 8,
  parameter int unsigned HIT_W       = 32,
  parameter int unsigned SLICE_LEN   = 4_000_000,
  parameter int unsigned MARK_BIT    = 10,
  parameter int unsigned DBUF_DEPTH  = 16,
  parameter int unsigned MFIFO_DEPTH = 16,
  localparam int unsigned ROW_W      = N_LINKS * HIT_W
) (
  input  logic                  clk,
  input  logic                  rst_n,           // whole system, TFC model included
  input  logic                  geri_rst_n_i,    // re-initialization of GERI only
  input  logic                  emu_rst_n_i,     // re-initialization of GBTxEMU only
  output logic                  frame_stb_o,
  // TFC model
  input  logic [5:0]            tfc_mark_bit_i,
  input  logic [TIME_LSB-1:0]   tfc_payload_i,
  output logic [FRAME_W-1:0]    tfc_dl_frame_o,
  output logic                  tfc_time_sig_o,
  output logic [TIME_W-1:0]     tfc_time_o,
  // GERI: GBT links
  input  logic                  geri_tfc_valid_i,
  input  logic [FRAME_W-1:0]    geri_tfc_frame_i,
  input  logic [TIME_LSB-1:0]   geri_dl_payload_i,
  output logic [FRAME_W-1:0]    geri_dl_frame_o,
  output logic [TIME_W-1:0]     geri_time_o,
  output logic                  geri_locked_o,
  output logic [15:0]           geri_resync_cnt_o,
  // GERI: data path
  input  logic [N_LINKS-1:0]    hit_valid_i,
  input  logic [ROW_W-1:0]      hit_data_i,
  output logic                  dma_valid_o,
  input  logic                  dma_ready_i,
  output logic [ROW_W-1:0]      dma_data_o,
  output logic [31:0]           slice_o,
  output logic [15:0]           dbuf_overflow_o,
  output logic [$clog2(N_LINKS+1)-1:0] conc_fill_o,
  // GERI: Wishbone
  input  wb_req_t               geri_wb_i,
  output wb_rsp_t               geri_wb_o,
  // GBTxEMU
  input  logic                  emu_dl_valid_i,
  input  logic [FRAME_W-1:0]    emu_dl_frame_i,
  output logic [TIME_LSB-1:0]   emu_dl_payload_o,
  output logic [TIME_W-1:0]     emu_time_o,
  output logic                  emu_locked_o,
  output logic [15:0]           emu_resync_cnt_o,
  input  logic [7:0]            emu_sync_in_data_i,
  output logic                  emu_marker_o,
  input  wb_req_t               emu_wb_i,
  output wb_rsp_t               emu_wb_o
);

  // ------------------------------------------------------------ frame strobe (40 MHz)
  logic [1:0] sub_q;
  always_ff @(posedge clk) begin
    if (!rst_n) sub_q <= 2'd2;
    else        sub_q <= (sub_q == 2'd2) ? 2'd0 : sub_q + 2'd1;
  end
  assign frame_stb_o = rst_n && (sub_q == 2'd2);

  // ------------------------------------------------------------ TFC model
  tfc_time_marker_gen #(.W(TIME_W), .MARK_BIT(MARK_BIT)) u_tfc (
    .clk, .rst_n, .frame_stb(frame_stb_o), .mark_bit_sel(tfc_mark_bit_i),
    .time_o(tfc_time_o), .time_sig_o(tfc_time_sig_o));

  gbt_time_inserter u_tfc_ins (
    .clk, .rst_n, .frame_stb(frame_stb_o), .payload_i(tfc_payload_i),
    .time_i(tfc_time_o), .frame_o(tfc_dl_frame_o));

  // ------------------------------------------------------------ board resets
  // Each board can be re-initialized on its own while the TFC model keeps running, as in the
  // synchronization tests; a re-initialized board takes its time again from its GBT link.
  logic geri_rst_n, emu_rst_n;
  assign geri_rst_n = rst_n && geri_rst_n_i;
  assign emu_rst_n  = rst_n && emu_rst_n_i;

  // ------------------------------------------------------------ GERI
  logic geri_run;

  time_counter_sync u_geri_sync (
    .clk, .rst_n(geri_rst_n), .frame_stb(frame_stb_o), .rx_valid_i(geri_tfc_valid_i),
    .rx_frame_i(geri_tfc_frame_i), .time_o(geri_time_o), .locked_o(geri_locked_o),
    .resync_cnt_o(geri_resync_cnt_o));

  gbt_time_inserter u_geri_ins (
    .clk, .rst_n(geri_rst_n), .frame_stb(frame_stb_o), .payload_i(geri_dl_payload_i),
    .time_i(geri_time_o), .frame_o(geri_dl_frame_o));

  wb_csr #(.ID(FW_ID), .VER(GERI_VER)) u_geri_csr (
    .clk, .rst_n(geri_rst_n), .wb_i(geri_wb_i), .wb_o(geri_wb_o), .run_o(geri_run),
    .fifo_head_i('0), .fifo_empty_i(1'b1), .fifo_full_i(1'b0), .fifo_count_i(8'd0),
    .fifo_overflow_i(16'd0), .fifo_pop_o());

  logic             conc_valid;
  logic [ROW_W-1:0] conc_data;

  data_concentrator #(.N(N_LINKS), .W(HIT_W)) u_conc (
    .clk, .rst_n(geri_rst_n), .in_valid(hit_valid_i), .in_data(hit_data_i),
    .out_valid(conc_valid), .out_data(conc_data), .fill_o(conc_fill_o));

  logic             dbuf_empty, dbuf_pop;
  logic [ROW_W-1:0] dbuf_data;

  sync_fifo #(.WIDTH(ROW_W), .DEPTH(DBUF_DEPTH)) u_dbuf (
    .clk, .rst_n(geri_rst_n), .wr_en(conc_valid), .wr_data(conc_data), .rd_en(dbuf_pop),
    .rd_data(dbuf_data), .empty(dbuf_empty), .full(), .count(),
    .overflow_cnt(dbuf_overflow_o));

  logic triv_s_ready;
  assign dbuf_pop = triv_s_ready && !dbuf_empty;

  triv_proc #(.ROW_W(ROW_W), .TW(TIME_W), .SLICE_LEN(SLICE_LEN)) u_triv (
    .clk, .rst_n(geri_rst_n), .run(geri_run), .time_i(geri_time_o),
    .s_valid(!dbuf_empty), .s_ready(triv_s_ready), .s_data(dbuf_data),
    .m_valid(dma_valid_o), .m_ready(dma_ready_i), .m_data(dma_data_o), .slice_o(slice_o));

  // ------------------------------------------------------------ GBTxEMU
  logic               emu_run;
  logic [PHASE_W-1:0] mrx_phase;
  logic [TIME_W-1:0]  mrx_time;
  marker_rec_t        mfifo_head;
  logic               mfifo_empty, mfifo_full, mfifo_pop;
  logic [$clog2(MFIFO_DEPTH+1)-1:0] mfifo_count;
  logic [15:0]        mfifo_overflow;

  assign emu_dl_payload_o = emu_dl_frame_i[TIME_LSB-1:0];

  time_counter_sync u_emu_sync (
    .clk, .rst_n(emu_rst_n), .frame_stb(frame_stb_o), .rx_valid_i(emu_dl_valid_i),
    .rx_frame_i(emu_dl_frame_i), .time_o(emu_time_o), .locked_o(emu_locked_o),
    .resync_cnt_o(emu_resync_cnt_o));

  time_marker_rx #(.TW(TIME_W)) u_mrx (
    .clk, .rst_n(emu_rst_n), .frame_stb(frame_stb_o), .enable(emu_run),
    .sync_in_data(emu_sync_in_data_i), .time_i(emu_time_o),
    .rec_valid_o(emu_marker_o), .rec_phase_o(mrx_phase), .rec_time_o(mrx_time));

  sync_fifo #(.WIDTH(MARKER_REC_W), .DEPTH(MFIFO_DEPTH)) u_mfifo (
    .clk, .rst_n(emu_rst_n), .wr_en(emu_marker_o), .wr_data({mrx_phase, mrx_time}),
    .rd_en(mfifo_pop), .rd_data(mfifo_head), .empty(mfifo_empty), .full(mfifo_full),
    .count(mfifo_count), .overflow_cnt(mfifo_overflow));

  wb_csr #(.ID(FW_ID), .VER(GBTXEMU_VER)) u_emu_csr (
    .clk, .rst_n(emu_rst_n), .wb_i(emu_wb_i), .wb_o(emu_wb_o), .run_o(emu_run),
    .fifo_head_i(mfifo_head), .fifo_empty_i(mfifo_empty), .fifo_full_i(mfifo_full),
    .fifo_count_i(8'(mfifo_count)), .fifo_overflow_i(mfifo_overflow), .fifo_pop_o(mfifo_pop));

endmodule
