// triv_proc: GERI time-slice packetizer ("trivial processor") between concentrator and DMA.
//
// While ctrl.run is set, the stream of concentrated data rows is cut into time slices of
// SLICE_LEN time-counter ticks. Each slice is one packet for the DMA engine:
//   header  row: word0 = {slice[31:0], 32'h579acce7}, word1 = start time, words 2.. = 0
//   data    rows taken unchanged from the input stream
//   trailer row: word0 = {slice[31:0], 32'hed9acce7}, word1 = end time,   words 2.. = 0
// (words are 64 bits, word0 at the low end of the row). Slice boundaries are exact: a slice
// that starts at time T ends at T + SLICE_LEN, and the next header carries that same time, even
// if the output was stalled when the boundary passed. Clearing run closes the open slice at
// once with the current time as its end time; setting it again opens a new slice at the current
// time. The slice number keeps counting across stops.
//
// Interface: run, time_i; s_valid/s_ready/s_data (input rows, taken when both are high);
// m_valid/m_ready/m_data (output rows, held until m_ready). slice_o is the current slice number.
// The packet layout, the magic words and the default slice length are read from the data
// received on the real system; the stop/start behaviour and the handshake are this design's
// choices.
module triv_proc
  import readout_pkg::*;
#(
  parameter int unsigned ROW_W     = 256,
  parameter int unsigned TW        = TIME_W,
  parameter int unsigned SLICE_LEN = 4_000_000
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             run,
  input  logic [TW-1:0]    time_i,
  input  logic             s_valid,
  output logic             s_ready,
  input  logic [ROW_W-1:0] s_data,
  output logic             m_valid,
  input  logic             m_ready,
  output logic [ROW_W-1:0] m_data,
  output logic [31:0]      slice_o
);

  typedef enum logic [1:0] {ST_IDLE, ST_DATA, ST_NEXT_HDR} state_e;

  state_e        state;
  logic [TW-1:0] start_q;
  logic [TW-1:0] elapsed;
  logic          slot_free, boundary, close_now;

  function automatic logic [ROW_W-1:0] mk_row(logic [31:0] magic, logic [31:0] slice,
                                              logic [TW-1:0] t);
    logic [ROW_W-1:0] r;
    r         = '0;
    r[63:0]   = {slice, magic};
    r[127:64] = 64'(t);
    return r;
  endfunction

  assign elapsed   = time_i - start_q;
  assign boundary  = elapsed >= TW'(SLICE_LEN);
  assign slot_free = !m_valid || m_ready;
  assign close_now = (state == ST_DATA) && (!run || boundary);
  assign s_ready   = (state == ST_DATA) && slot_free && !close_now;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= ST_IDLE;
      start_q <= '0;
      slice_o <= '0;
      m_valid <= 1'b0;
      m_data  <= '0;
    end else begin
      if (m_valid && m_ready) m_valid <= 1'b0;
      if (slot_free) begin
        unique case (state)
          ST_IDLE: if (run) begin
            m_valid <= 1'b1;
            m_data  <= mk_row(HDR_MAGIC, slice_o, time_i);
            start_q <= time_i;
            state   <= ST_DATA;
          end
          ST_DATA: begin
            if (close_now) begin
              m_valid <= 1'b1;
              m_data  <= mk_row(TRL_MAGIC, slice_o, boundary ? start_q + TW'(SLICE_LEN) : time_i);
              slice_o <= slice_o + 1'b1;
              if (boundary && run) begin
                start_q <= start_q + TW'(SLICE_LEN);
                state   <= ST_NEXT_HDR;
              end else begin
                state   <= ST_IDLE;
              end
            end else if (s_valid) begin
              m_valid <= 1'b1;
              m_data  <= s_data;
            end
          end
          ST_NEXT_HDR: begin
            m_valid <= 1'b1;
            m_data  <= mk_row(HDR_MAGIC, slice_o, start_q);
            state   <= ST_DATA;
          end
          default: state <= ST_IDLE;
        endcase
      end
    end
  end

  a_hold_until_taken: assert property (@(posedge clk) disable iff (!rst_n)
                                       m_valid && !m_ready |=> m_valid && $stable(m_data))
    else $error("triv_proc: output changed before it was taken");

endmodule
