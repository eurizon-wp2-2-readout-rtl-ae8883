// time_counter_sync: local time counter kept in step with the time value received over GBT.
//
// GERI receives the time counter from the TFC, and GBTxEMU receives it from GERI, in the upper
// bits of each received frame (frame[79:24]). This block keeps a local counter that advances by
// one per frame period. On every frame strobe with a valid frame it compares the received value
// with what the local counter predicts; if they differ it loads the received value (a resync)
// and counts the event. locked_o is high while the last received value agreed with the local
// count. When the link is not valid the counter free-runs.
//
// Interface: frame_stb, rx_valid_i, rx_frame_i; time_o, locked_o, resync_cnt_o (saturating).
// Timing: time_o changes one clk after the strobe.
// That both boards' time counters must follow the value delivered by the TFC comes from the
// document; the compare-and-reload scheme and the counter of resyncs are this design's choice.
module time_counter_sync
  import readout_pkg::*;
#(
  parameter int unsigned FW   = FRAME_W,
  parameter int unsigned TLSB = TIME_LSB
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               frame_stb,
  input  logic               rx_valid_i,
  input  logic [FW-1:0]      rx_frame_i,
  output logic [FW-TLSB-1:0] time_o,
  output logic               locked_o,
  output logic [15:0]        resync_cnt_o
);

  localparam int unsigned TW = FW - TLSB;

  logic [TW-1:0] rx_time, predicted;

  assign rx_time   = rx_frame_i[FW-1:TLSB];
  assign predicted = time_o + 1'b1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      time_o       <= '0;
      locked_o     <= 1'b0;
      resync_cnt_o <= '0;
    end else if (frame_stb) begin
      if (rx_valid_i) begin
        time_o   <= rx_time;
        locked_o <= (rx_time == predicted);
        if (rx_time != predicted && resync_cnt_o != '1) resync_cnt_o <= resync_cnt_o + 1'b1;
      end else begin
        time_o   <= predicted;
        locked_o <= 1'b0;
      end
    end
  end

endmodule
