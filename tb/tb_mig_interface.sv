// tb_mig_interface: the MIG interface module against the behavioural DDR3
// controller model (random ready stalls). 24 write bursts with random data
// are queued, then 24 reads of the same addresses. Checks: memory holds every
// written word; each read pushes its header into the keep FIFO at AR time,
// four words equal to the written data into the read data FIFO, and then a
// label; while writes and reads both wait, they are served alternately.
module tb_mig_interface;
  import mas_pkg::*;
  logic clk = 0, rst_n = 1;
  // reset starts high and falls at 1 ns, so the asynchronous resets see an edge
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  logic wcmd_empty, wcmd_ren, wdat_empty, wdat_ren, rcmd_empty, rcmd_ren;
  logic [63:0] wcmd_rdata, wdat_rdata, rcmd_rdata;
  logic keep_wen, rdat_wen, rlab_wen;
  logic [63:0] keep_wdata, rdat_wdata, rlab_wdata;
  logic [15:0] resp_err; logic ev_wr_done, ev_rd_done, init_done;
  logic [3:0]  awid, bid, arid, rid;
  logic [31:0] awaddr, araddr;
  logic [7:0]  awlen, arlen, wstrb;
  logic [2:0]  awsize, arsize;
  logic [1:0]  awburst, arburst, bresp, rresp;
  logic        awvalid, awready, wlast, wvalid, wready, bvalid, bready;
  logic        arvalid, arready, rlast, rvalid, rready;
  logic [63:0] wdata, rdata;

  mig_interface dut (.clk, .rst_n,
    .wcmd_empty, .wcmd_ren, .wcmd_rdata, .wdat_empty, .wdat_ren, .wdat_rdata,
    .rcmd_empty, .rcmd_ren, .rcmd_rdata,
    .keep_wen, .keep_wdata, .keep_full(1'b0), .rdat_wen, .rdat_wdata, .rdat_free(12'd2048),
    .rlab_wen, .rlab_wdata, .rlab_full(1'b0),
    .m_awid(awid), .m_awaddr(awaddr), .m_awlen(awlen), .m_awsize(awsize), .m_awburst(awburst),
    .m_awvalid(awvalid), .m_awready(awready),
    .m_wdata(wdata), .m_wstrb(wstrb), .m_wlast(wlast), .m_wvalid(wvalid), .m_wready(wready),
    .m_bid(bid), .m_bresp(bresp), .m_bvalid(bvalid), .m_bready(bready),
    .m_arid(arid), .m_araddr(araddr), .m_arlen(arlen), .m_arsize(arsize), .m_arburst(arburst),
    .m_arvalid(arvalid), .m_arready(arready),
    .m_rid(rid), .m_rdata(rdata), .m_rresp(rresp), .m_rlast(rlast), .m_rvalid(rvalid), .m_rready(rready),
    .resp_err, .ev_wr_done, .ev_rd_done);

  axi_mig_model #(.INIT_CYCLES(2), .STALL(3)) u_mig (.clk, .rst_n, .init_calib_complete(init_done),
    .awid, .awaddr, .awlen, .awsize, .awburst, .awvalid, .awready,
    .wdata, .wstrb, .wlast, .wvalid, .wready, .bid, .bresp, .bvalid, .bready,
    .arid, .araddr, .arlen, .arsize, .arburst, .arvalid, .arready,
    .rid, .rdata, .rresp, .rlast, .rvalid, .rready);

  localparam int N = 24;
  logic [63:0] wc [N]; logic [63:0] wd [N*4]; logic [63:0] rc [N];
  int wch = 0, wct = 0, wdh = 0, wdt = 0, rch = 0, rct = 0;
  assign wcmd_empty = (wch == wct); assign wcmd_rdata = wc[wch % N];
  assign wdat_empty = (wdh == wdt); assign wdat_rdata = wd[wdh % (N*4)];
  assign rcmd_empty = (rch == rct); assign rcmd_rdata = rc[rch % N];
  always @(posedge clk) begin
    if (wcmd_ren && !wcmd_empty) wch <= wch + 1;
    if (wdat_ren && !wdat_empty) wdh <= wdh + 1;
    if (rcmd_ren && !rcmd_empty) rch <= rch + 1;
  end

  logic [63:0] keep_q [$], rdat_q [$], lab_q [$];
  int alt = 0, nops = 0; logic last_rd;
  always @(posedge clk) begin
    if (keep_wen) keep_q.push_back(keep_wdata);
    if (rdat_wen) rdat_q.push_back(rdat_wdata);
    if (rlab_wen) lab_q.push_back(rlab_wdata);
    if (ev_wr_done) begin if (nops > 0 && last_rd) alt++; last_rd = 0; nops++; end
    if (ev_rd_done) begin if (nops > 0 && !last_rd) alt++; last_rd = 1; nops++; end
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    logic [31:0] addrs [N];
    for (int b = 0; b < N; b++) begin
      addrs[b] = 32'h0010_0000 + 32'(b) * 32;
      wc[b] = make_header(addrs[b], 4'(b), 1'b0);
      for (int i = 0; i < 4; i++) wd[b*4+i] = {$urandom, $urandom};
      // reads of the first half are issued while writes are still waiting
      rc[b] = make_header(addrs[b < N/2 ? b : b], 4'(b), 1'b1);
    end
    repeat (3) @(posedge clk); rst_n = 1;
    // writes of the first half, wait, then the rest of the writes together with reads
    @(negedge clk); wct = N/2; wdt = 4*(N/2);
    wait (u_mig.n_writes == N/2);
    @(negedge clk); wct = N; wdt = 4*N; rct = N/2;
    wait (u_mig.n_writes == N && lab_q.size() == N/2);
    @(negedge clk); rct = N;
    wait (lab_q.size() == N);
    repeat (5) @(posedge clk);
    for (int b = 0; b < N; b++)
      for (int i = 0; i < 8; i++)
        check(u_mig.peek32(addrs[b] + 32'(4*i)) == wd[b*4 + i/2][(i%2)*32 +: 32], $sformatf("memory burst %0d word %0d", b, i));
    for (int b = 0; b < N; b++) begin
      check(keep_q[b] == rc[b] && lab_q[b] == rc[b], $sformatf("keep/label header %0d", b));
      for (int i = 0; i < 4; i++) check(rdat_q[b*4+i] == wd[b*4+i], $sformatf("read data %0d.%0d", b, i));
    end
    check(alt >= 10, $sformatf("round-robin switches %0d", alt));
    check(resp_err == 0, "no error responses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
