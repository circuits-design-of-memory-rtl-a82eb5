// tb_top_full: the memory accessing system at its default size (4096 x 32
// FIFOs on the processor side, 2048 x 64 on the memory side, the 16 KiB test
// area, 16 outstanding reads, the COPY kernel) run from reset through the
// fill of 0x0000..0x4000, the copy of the area to 0x1000_0000 and the
// read-back check of both areas in the DDR3 controller model. aclk 10 ns,
// ch_clk 7 ns, ui_clk 5 ns. It reports the elapsed time of the two phases.
module tb_top_full;
  import mas_pkg::*;

  localparam int unsigned AREA   = 32'h4000;
  localparam int unsigned BURSTS = AREA / 32;
  localparam logic [31:0] DST    = 32'h1000_0000;

  logic aclk = 0, ch_clk = 0, ui_clk = 0, rst_n = 1;
  // reset starts high and falls at 1 ns, so the asynchronous resets see an edge
  initial #1 rst_n = 0;
  always #5   aclk   = ~aclk;
  always #3.5 ch_clk = ~ch_clk;
  always #2.5 ui_clk = ~ui_clk;

  logic init_calib_complete, fill_done, test_stop;
  logic [15:0] rd_mismatch, resp_err;
  logic [3:0]  awid, bid, arid, rid;
  logic [31:0] awaddr, araddr;
  logic [7:0]  awlen, arlen, wstrb;
  logic [2:0]  awsize, arsize;
  logic [1:0]  awburst, arburst, bresp, rresp;
  logic        awvalid, awready, wlast, wvalid, wready, bvalid, bready;
  logic        arvalid, arready, rlast, rvalid, rready;
  logic [63:0] wdata, rdata;

  mem_access_top u_dut (
    .aclk, .ch_clk, .ui_clk, .rst_n, .init_calib_complete,
    .m_awid(awid), .m_awaddr(awaddr), .m_awlen(awlen), .m_awsize(awsize), .m_awburst(awburst),
    .m_awvalid(awvalid), .m_awready(awready),
    .m_wdata(wdata), .m_wstrb(wstrb), .m_wlast(wlast), .m_wvalid(wvalid), .m_wready(wready),
    .m_bid(bid), .m_bresp(bresp), .m_bvalid(bvalid), .m_bready(bready),
    .m_arid(arid), .m_araddr(araddr), .m_arlen(arlen), .m_arsize(arsize), .m_arburst(arburst),
    .m_arvalid(arvalid), .m_arready(arready),
    .m_rid(rid), .m_rdata(rdata), .m_rresp(rresp), .m_rlast(rlast), .m_rvalid(rvalid), .m_rready(rready),
    .fill_done, .test_stop, .rd_mismatch, .resp_err
  );

  axi_mig_model #(.STALL(0)) u_mig (
    .clk(ui_clk), .rst_n, .init_calib_complete,
    .awid, .awaddr, .awlen, .awsize, .awburst, .awvalid, .awready,
    .wdata, .wstrb, .wlast, .wvalid, .wready, .bid, .bresp, .bvalid, .bready,
    .arid, .araddr, .arlen, .arsize, .arburst, .arvalid, .arready,
    .rid, .rdata, .rresp, .rlast, .rvalid, .rready
  );

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    longint t0, t1, t2;
    repeat (10) @(posedge aclk);
    rst_n = 1;
    wait (init_calib_complete === 1'b1);
    t0 = $time;
    wait (fill_done === 1'b1);
    t1 = $time;
    wait (test_stop === 1'b1);
    wait (u_mig.n_writes == int'(2 * BURSTS + 1));
    t2 = $time;
    repeat (4) @(posedge aclk);
    for (int j = 0; j < int'(AREA / 4) + 8; j++)
      check(u_mig.peek32(32'(4 * j)) == 32'(j), $sformatf("fill word %0d", j));
    for (int j = 0; j < int'(AREA / 4); j++)
      check(u_mig.peek32(DST + 32'(4 * j)) == 32'(j), $sformatf("copied word %0d", j));
    check(rd_mismatch == 0, "read data differed from the fill pattern");
    check(resp_err == 0, "controller answered an error");
    check(u_mig.n_reads == int'(BURSTS), "controller reads");
    $display("fill: %0d aclk cycles, copy: %0d aclk cycles", (t1 - t0) / 10, (t2 - t1) / 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge aclk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
