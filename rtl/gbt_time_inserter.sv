// gbt_time_inserter: puts the time counter into the unused bits of the GBT downlink frame.
//
// The 80-bit GBT data field sent once per 40 MHz frame carries the regular downlink payload in
// its low bits and, in the bits the payload does not use, the sender's time counter:
// frame[79:24] = time, frame[23:0] = payload. The frame is registered on the frame strobe, so
// the link sees a stable word for the whole frame period.
//
// Interface: frame_stb, payload_i (TIME_LSB bits), time_i (FRAME_W-TIME_LSB bits), frame_o.
// Latency: frame_o holds the values present at the strobe from the next clk on.
// Sending the time counter in the unused downlink bits follows the document; the position
// [79:24] is read from the receiver-side signal of its synchronization test, and the split of
// the remaining bits is this design's choice.
module gbt_time_inserter
  import readout_pkg::*;
#(
  parameter int unsigned FW   = FRAME_W,
  parameter int unsigned TLSB = TIME_LSB
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               frame_stb,
  input  logic [TLSB-1:0]    payload_i,
  input  logic [FW-TLSB-1:0] time_i,
  output logic [FW-1:0]      frame_o
);

  always_ff @(posedge clk) begin
    if (!rst_n)         frame_o <= '0;
    else if (frame_stb) frame_o <= {time_i, payload_i};
  end

endmodule
