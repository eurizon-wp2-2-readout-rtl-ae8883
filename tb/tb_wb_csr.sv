// tb_wb_csr: Wishbone reads and writes of the register bank, with a small FIFO model behind it.
//
// Checks the ID and VER values, that CTRL.run is written, read back and drives run_o, that
// writes to read-only registers change nothing, that STATUS reflects the FIFO inputs, that
// MARK_HI/MARK_LO return the head record split as documented and that reading MARK_LO pops the
// FIFO exactly once (and not when it is empty), and that ack comes one clock after the request.
module tb_wb_csr;
  import readout_pkg::*;

  logic clk = 0, rst_n = 0;
  wb_req_t req;
  wb_rsp_t rsp;
  logic run, pop;
  marker_rec_t fifo [$];
  marker_rec_t head;
  int pops = 0;
  int checks = 0, failures = 0;

  wb_csr #(.ID(FW_ID), .VER(GBTXEMU_VER)) dut (
    .clk, .rst_n, .wb_i(req), .wb_o(rsp), .run_o(run),
    .fifo_head_i(head), .fifo_empty_i(fifo.size() == 0), .fifo_full_i(fifo.size() >= 16),
    .fifo_count_i(8'(fifo.size())), .fifo_overflow_i(16'h00a5), .fifo_pop_o(pop));

  always #5 clk = ~clk;
  always_comb head = (fifo.size() > 0) ? fifo[0] : '0;
  always @(posedge clk) if (pop) begin void'(fifo.pop_front()); pops++; end

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wb_access(bit we, logic [7:0] adr, logic [31:0] wdat, output logic [31:0] rdat);
    int lat = 0;
    req = '{cyc: 1'b1, stb: 1'b1, we: we, adr: adr, dat: wdat};
    do begin
      @(posedge clk);
      #1 lat++;
    end while (!rsp.ack && lat < 10);
    checks++;
    if (lat != 1) begin failures++; $display("ack latency %0d", lat); end
    rdat = rsp.dat;
    req = '0;
    @(negedge clk);
    @(negedge clk);   // one idle clock between accesses
  endtask

  task automatic rd_check(logic [7:0] adr, logic [31:0] exp, string what);
    logic [31:0] d;
    wb_access(0, adr, '0, d);
    checks++;
    if (d != exp) begin failures++; $display("%s: read %h expected %h", what, d, exp); end
  endtask

  initial begin
    logic [31:0] d;
    req = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    rd_check(REG_ID, 32'h1ed91fca, "ID");
    rd_check(REG_VER, 32'h52c6231d, "VER");
    rd_check(REG_CTRL, 32'h0, "CTRL after reset");
    checks++; if (run) failures++;
    wb_access(1, REG_CTRL, 32'h1, d);
    rd_check(REG_CTRL, 32'h1, "CTRL run");
    checks++; if (!run) begin failures++; $display("run_o not set"); end
    wb_access(1, REG_ID, 32'h0, d);
    rd_check(REG_ID, 32'h1ed91fca, "ID after write");
    // empty FIFO: status and no pop
    rd_check(REG_STATUS, {16'h00a5, 8'd0, 6'b0, 1'b0, 1'b1}, "STATUS empty");
    rd_check(REG_MARK_LO, 32'h0, "MARK_LO empty");
    checks++; if (pops != 0) begin failures++; $display("pop on empty"); end
    // fill with records and read them back
    for (int i = 0; i < 5; i++) begin
      marker_rec_t r;
      r.phase  = PHASE_W'($urandom_range(0, 23));
      r.time_v = {24'($urandom), 32'($urandom)};
      fifo.push_back(r);
    end
    rd_check(REG_STATUS, {16'h00a5, 8'd5, 6'b0, 1'b0, 1'b0}, "STATUS 5");
    for (int i = 0; i < 5; i++) begin
      marker_rec_t r;
      r = fifo[0];
      rd_check(REG_MARK_HI, {3'b0, r.phase, r.time_v[55:32]}, "MARK_HI");
      checks++; if (fifo.size() != 5 - i) begin failures++; $display("MARK_HI popped"); end
      rd_check(REG_MARK_LO, r.time_v[31:0], "MARK_LO");
      @(negedge clk);
      checks++; if (fifo.size() != 4 - i) begin failures++; $display("MARK_LO did not pop once"); end
    end
    wb_access(1, REG_CTRL, 32'h0, d);
    checks++; if (run) begin failures++; $display("run_o not cleared"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
