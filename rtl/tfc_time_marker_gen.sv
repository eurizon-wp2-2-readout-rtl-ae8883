// tfc_time_marker_gen: time counter and LVDS time signal of the TFC (Time and Fast Control) model.
//
// The counter advances by one on every frame strobe (one 40 MHz reference period). The time
// signal follows the lowest counter bit and is inverted whenever the selected bit N changes,
// i.e. time_sig = t[0] ^ t[N]. At each carry into bit N both bits flip together, so one edge is
// missing: the signal holds one level for two periods instead of one. That long level is the
// time marker, injected every 2^N periods, and its centre (the place of the missing edge) lines
// up with the change of bit N.
//
// Interface: frame_stb (one clk cycle per frame period), mark_bit_sel (N; 0 or a value outside
// 1..W-1 selects the default MARK_BIT), time_o,
// time_sig_o (registered, changes one clk after the strobe, together with time_o).
// The counting rule and the "lowest bit inverted on change of bit N" marker follow the
// description of the TFC model; writing the inversion as an XOR, the counter width and the
// reset value of zero are choices of this design.
module tfc_time_marker_gen
  import readout_pkg::*;
#(
  parameter int unsigned W        = TIME_W,
  parameter int unsigned MARK_BIT = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         frame_stb,
  input  logic [5:0]   mark_bit_sel,
  output logic [W-1:0] time_o,
  output logic         time_sig_o
);

  logic [W-1:0] cnt;
  logic [5:0]   nsel;

  always_comb begin
    nsel = mark_bit_sel;
    if (nsel == 6'd0 || 32'(nsel) >= W) nsel = 6'(MARK_BIT);
  end

  always_ff @(posedge clk) begin
    if (!rst_n)          cnt <= '0;
    else if (frame_stb)  cnt <= cnt + 1'b1;
  end

  assign time_o     = cnt;
  assign time_sig_o = cnt[0] ^ cnt[nsel];

endmodule
