// data_concentrator: packs hit words from N inputs into dense N-word output rows.
//
// Each cycle any subset of the N inputs may carry a W-bit word. The valid words are compacted
// in input order (input 0 first): word i goes to slot fill + (number of valid inputs below i),
// appended after the fill words already waiting in the internal buffer. When fill plus the new
// words reach N, the first N slots leave as one output row and the rest stay for the next
// cycle. The output therefore carries only valid words, never empty slots, and since at most N
// words enter per cycle and one N-word row can leave per cycle, the concentrator never has to
// stall its inputs. Words that are still waiting stay until later hits complete the row.
//
// Interface: in_valid[N], in_data[N*W] (word i at bits i*W +: W); out_valid, out_data[N*W]
// (slot 0 at the low bits, earlier words in lower slots). Timing: a row is registered and
// appears one clk after the cycle that completed it.
// The document gives the purpose (concentrating data from many inputs without losing bandwidth)
// and the tested sizes; the inside of its interconnection network is given elsewhere and is
// replaced here by the simplest structure with the same input/output behaviour: a prefix count
// and a 2N-slot staging array.
module data_concentrator #(
  parameter int unsigned N = 16,
  parameter int unsigned W = 32
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [N-1:0]   in_valid,
  input  logic [N*W-1:0] in_data,
  output logic           out_valid,
  output logic [N*W-1:0] out_data,
  output logic [$clog2(N+1)-1:0] fill_o
);

  localparam int unsigned CW = $clog2(2*N + 1);

  logic [W-1:0]  buf_q [N];       // waiting words, slots 0..fill-1 are valid
  logic [CW-1:0] fill_q;
  logic [W-1:0]  stage [2*N];
  logic [CW-1:0] pre, total;
  logic [$clog2(2*N)-1:0] slot;

  always_comb begin
    for (int j = 0; j < int'(2*N); j++) stage[j] = (j < int'(N)) ? buf_q[j] : '0;
    pre  = '0;
    slot = '0;
    for (int i = 0; i < int'(N); i++) begin
      if (in_valid[i]) begin
        slot        = ($clog2(2*N))'(fill_q + pre);
        stage[slot] = in_data[i*W +: W];
        pre = pre + 1'b1;
      end
    end
    total = fill_q + pre;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fill_q    <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      for (int j = 0; j < int'(N); j++) buf_q[j] <= '0;
    end else begin
      out_valid <= 1'b0;
      if (total >= CW'(N)) begin
        out_valid <= 1'b1;
        for (int j = 0; j < int'(N); j++) begin
          out_data[j*W +: W] <= stage[j];
          buf_q[j]           <= stage[N + j];
        end
        fill_q <= total - CW'(N);
      end else begin
        for (int j = 0; j < int'(N); j++) buf_q[j] <= stage[j];
        fill_q <= total;
      end
    end
  end

  assign fill_o = ($clog2(N+1))'(fill_q);

  a_fill_below_n: assert property (@(posedge clk) disable iff (!rst_n) fill_q < CW'(N))
    else $error("data_concentrator: fill out of range");

endmodule
