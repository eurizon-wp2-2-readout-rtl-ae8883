// sync_fifo: single-clock first-word-fall-through FIFO with an overflow counter.
//
// Used twice: as the Wishbone-readable FIFO of time-marker records in GBTxEMU, and as the
// buffer between the data concentrator and the time-slice packetizer in GERI. The head entry is
// always visible on rd_data while empty is low; rd_en pops it. A write while the FIFO is full
// is dropped and counted in overflow_cnt (saturating), because neither source can be stalled:
// markers and detector hits arrive when they arrive.
//
// Interface: wr_en/wr_data, rd_en/rd_data, empty, full, count, overflow_cnt.
// Timing: a written word is visible at the head one clk later; simultaneous read and write are
// allowed. The document names the FIFO only; depth, width and overflow handling are this
// design's choices. DEPTH must be a power of two.
module sync_fifo #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned DEPTH = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_en,
  input  logic [WIDTH-1:0]           wr_data,
  input  logic                       rd_en,
  output logic [WIDTH-1:0]           rd_data,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic [15:0]                overflow_cnt
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic             do_wr, do_rd;

  assign empty   = (count == '0);
  assign full    = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign do_rd   = rd_en && !empty;
  assign do_wr   = wr_en && (!full || do_rd);
  assign rd_data = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr       <= '0;
      rd_ptr       <= '0;
      count        <= '0;
      overflow_cnt <= '0;
    end else begin
      if (do_wr) wr_ptr <= wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= rd_ptr + 1'b1;
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
      if (wr_en && !do_wr && overflow_cnt != '1) overflow_cnt <= overflow_cnt + 1'b1;
    end
  end

  // The reader must not pop an empty FIFO.
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> !empty)
    else $error("sync_fifo: read while empty");

endmodule
