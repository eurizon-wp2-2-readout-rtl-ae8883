// wb_csr: Wishbone register bank of one board (GERI or GBTxEMU).
//
// A classic Wishbone slave with a 32-bit data bus and word addresses. Every access is
// acknowledged one clk after cyc&stb, with the read data registered in the same edge; ack drops
// for one clk before the next access is taken. Registers (see readout_pkg::wb_reg_e):
//   ID       firmware ID (parameter ID)
//   VER      firmware version (parameter VER)
//   CTRL     [0] run (starts and stops data reception in GERI, marker capture in GBTxEMU);
//            reset: run = 0
//   STATUS   marker FIFO empty/full/count and overflow counter
//   MARK_HI  {3'b0, phase[4:0], time[55:32]} of the FIFO head
//   MARK_LO  time[31:0] of the FIFO head; reading it pops the entry (if there is one)
// Writes to read-only registers are acknowledged and ignored.
// The ID and VER values and the run bit come from the board tests; the register addresses, the
// CTRL layout and the FIFO read protocol are this design's choices.
module wb_csr
  import readout_pkg::*;
#(
  parameter logic [31:0] ID  = FW_ID,
  parameter logic [31:0] VER = GERI_VER
) (
  input  logic        clk,
  input  logic        rst_n,
  input  wb_req_t     wb_i,
  output wb_rsp_t     wb_o,
  output logic        run_o,
  // marker FIFO read side
  input  marker_rec_t fifo_head_i,
  input  logic        fifo_empty_i,
  input  logic        fifo_full_i,
  input  logic [7:0]  fifo_count_i,
  input  logic [15:0] fifo_overflow_i,
  output logic        fifo_pop_o
);

  logic req;
  assign req = wb_i.cyc && wb_i.stb && !wb_o.ack;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wb_o       <= '0;
      run_o      <= 1'b0;
      fifo_pop_o <= 1'b0;
    end else begin
      wb_o.ack   <= req;
      fifo_pop_o <= 1'b0;
      if (req) begin
        if (wb_i.we) begin
          if (wb_i.adr == REG_CTRL) begin
            run_o <= wb_i.dat[0];
          end
          wb_o.dat <= '0;
        end else begin
          unique case (wb_i.adr)
            REG_ID:      wb_o.dat <= ID;
            REG_VER:     wb_o.dat <= VER;
            REG_CTRL:    wb_o.dat <= {31'b0, run_o};
            REG_STATUS:  wb_o.dat <= {fifo_overflow_i, fifo_count_i, 6'b0, fifo_full_i, fifo_empty_i};
            REG_MARK_HI: wb_o.dat <= {3'b0, fifo_head_i.phase, fifo_head_i.time_v[TIME_W-1:32]};
            REG_MARK_LO: begin
              wb_o.dat   <= fifo_head_i.time_v[31:0];
              fifo_pop_o <= !fifo_empty_i;
            end
            default:     wb_o.dat <= '0;
          endcase
        end
      end
    end
  end

  // Wishbone rule: ack only answers a request that was pending in the previous cycle.
  a_ack_follows_req: assert property (@(posedge clk) disable iff (!rst_n)
                                      wb_o.ack |-> $past(wb_i.cyc && wb_i.stb))
    else $error("wb_csr: ack without request");

endmodule
