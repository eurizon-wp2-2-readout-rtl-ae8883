// time_marker_rx: GBTxEMU receiver that measures the arrival phase of the TFC time marker.
//
// The LVDS time signal is sampled at 960 MHz by a deserializer that delivers 8 samples per
// 120 MHz clock (sync_in_data, bit 0 the earliest sample). Three 120 MHz cycles make one 40 MHz
// frame period; frame_stb marks the cycle right after the active edge of the recovered
// reference clock (clk_120_period = 0), so sample k of the word in cycle p sits at phase
// p*8+k, i.e. 0..23 in units of 1/24 frame period (about 1.04 ns).
//
// In normal operation the signal changes level every frame period (24 samples). The marker is a
// level that lasts two periods because one edge is missing. The receiver finds the first level
// change in each word, measures the length of the level that just ended, and when that length is
// between MARK_MIN and MARK_MAX samples it reports a marker whose centre phase is
// (phase of the starting edge + length/2) mod 24, together with the received time counter value
// present at that moment. Later edges inside the same word (glitches) are ignored.
//
// Interface: frame_stb, enable, sync_in_data[7:0], time_i; rec_valid_o (one-clk pulse), rec_phase_o, rec_time_o.
// Timing: the record appears one clk after the word that holds the edge ending the marker.
// The 960 MHz sampling, the 1 ns resolution relative to the reference edge and the {position,
// time} record follow the document; the run-length detection rule, the window limits and the
// bit order are this design's choices.
module time_marker_rx
  import readout_pkg::*;
#(
  parameter int unsigned TW       = TIME_W,
  parameter int unsigned MARK_MIN = 36,   // 1.5 frame periods
  parameter int unsigned MARK_MAX = 60    // 2.5 frame periods
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        frame_stb,
  input  logic                        enable,
  input  logic [SAMPLES_PER_SUB-1:0]  sync_in_data,
  input  logic [TW-1:0]               time_i,
  output logic                        rec_valid_o,
  output logic [PHASE_W-1:0]          rec_phase_o,
  output logic [TW-1:0]               rec_time_o
);

  localparam int unsigned RUN_W = 8;
  localparam int unsigned NS    = SAMPLES_PER_SUB;

  logic [1:0]         sub_q, sub_c;        // clk_120_period
  logic               prev_s;              // last sample of the previous word
  logic [RUN_W-1:0]   run_q;               // samples since the last edge, including it
  logic               seen_edge_q;
  logic [PHASE_W-1:0] start_phase_q;       // phase of the edge that started the current level

  // first level change inside the word
  logic               edge_found;
  logic [2:0]         edge_k;
  logic [NS-1:0]      trans;
  logic [RUN_W:0]     level_len;
  logic [PHASE_W-1:0] edge_phase;
  logic [PHASE_W+1:0] centre;
  logic [PHASE_W-1:0] centre_mod;
  logic               is_marker;

  always_comb begin
    sub_c = frame_stb ? 2'd0 : (sub_q == 2'd2 ? 2'd0 : sub_q + 2'd1);

    trans[0] = sync_in_data[0] ^ prev_s;
    for (int k = 1; k < int'(NS); k++) trans[k] = sync_in_data[k] ^ sync_in_data[k-1];

    edge_found = 1'b0;
    edge_k     = '0;
    for (int k = int'(NS) - 1; k >= 0; k--) begin
      if (trans[k]) begin
        edge_found = 1'b1;
        edge_k     = 3'(k);
      end
    end

    level_len  = {1'b0, run_q} + (RUN_W+1)'(edge_k);
    edge_phase = PHASE_W'(sub_c) * PHASE_W'(NS) + PHASE_W'(edge_k);
    centre     = (PHASE_W+2)'(start_phase_q) + (PHASE_W+2)'(level_len >> 1);
    if (centre >= (PHASE_W+2)'(2 * SAMPLES_PER_FRAME))
      centre_mod = PHASE_W'(centre - (PHASE_W+2)'(2 * SAMPLES_PER_FRAME));
    else if (centre >= (PHASE_W+2)'(SAMPLES_PER_FRAME))
      centre_mod = PHASE_W'(centre - (PHASE_W+2)'(SAMPLES_PER_FRAME));
    else
      centre_mod = PHASE_W'(centre);

    is_marker = edge_found && seen_edge_q &&
                level_len >= (RUN_W+1)'(MARK_MIN) && level_len <= (RUN_W+1)'(MARK_MAX);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sub_q         <= '0;
      prev_s        <= 1'b0;
      run_q         <= '0;
      seen_edge_q   <= 1'b0;
      start_phase_q <= '0;
      rec_valid_o   <= 1'b0;
      rec_phase_o   <= '0;
      rec_time_o    <= '0;
    end else begin
      sub_q       <= sub_c;
      prev_s      <= sync_in_data[NS-1];
      rec_valid_o <= 1'b0;
      if (edge_found) begin
        run_q         <= RUN_W'(NS) - RUN_W'(edge_k);
        seen_edge_q   <= 1'b1;
        start_phase_q <= edge_phase;
        if (is_marker && enable) begin
          rec_valid_o <= 1'b1;
          rec_phase_o <= centre_mod;
          rec_time_o  <= time_i;
        end
      end else if (run_q <= RUN_W'((1 << RUN_W) - 1 - NS)) begin
        run_q <= run_q + RUN_W'(NS);
      end else begin
        run_q <= '1;
      end
    end
  end

endmodule
