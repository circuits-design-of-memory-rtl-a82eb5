// tb_axi_stimulus: the stimulus in TRIAD mode on a 512-byte area, served by
// a simple in-order AXI slave memory written here (random ready stalls, reads
// answered from a queue with a random delay). Checks: nothing is issued
// before init_calib_complete; the fill writes word = address/4 over
// 0x000..0x200 inclusive, every burst with AWLEN=7, AWSIZE=2, INCR and full
// strobes; fill_done rises only after the burst at 0x200; read IDs count
// modulo 16 and no more than MAX_OUTSTANDING reads are in flight; every
// result c[i] = a[i] + 3*b[i] lands at 0x1000_0000 + offset; test_stop
// rises at the end and rd_mismatch stays 0.
module tb_axi_stimulus;
  import mas_pkg::*;
  localparam int AREA = 32'h200, MAXO = 4;
  logic aclk = 0, aresetn = 1, init = 0;
  // reset starts high and falls at 1 ns, so the asynchronous resets see an edge
  initial #1 aresetn = 0;
  always #5 aclk = ~aclk;

  logic awvalid, awready, wvalid, wready, wlast, bvalid, bready;
  logic [3:0] awid, wid, bid, wstrb; logic [31:0] awaddr, wdata;
  logic [7:0] awlen, arlen; logic [2:0] awsize, arsize; logic [1:0] awburst, arburst, bresp, rresp;
  logic arvalid, arready, rvalid, rready, rlast; logic [3:0] arid, rid;
  logic [31:0] araddr, rdata, rd_addr; logic fill_done, test_stop; logic [15:0] rd_mismatch;

  axi_stimulus #(.MODE(MODE_TRIAD), .AREA_BYTES(AREA), .MAX_OUTSTANDING(MAXO)) dut (
    .aclk, .aresetn, .init_calib_complete(init),
    .axi_wvalid(awvalid), .axi_wready(awready), .axi_wid(awid), .axi_waddr(awaddr),
    .axi_wlen(awlen), .axi_wsize(awsize), .axi_wburst(awburst),
    .axi_wd_valid(wvalid), .axi_wd_ready(wready), .axi_wd_wid(wid), .axi_wd_data(wdata),
    .axi_wd_strb(wstrb), .axi_wd_last(wlast),
    .axi_wd_bid(bid), .axi_wd_bresp(bresp), .axi_wd_bvalid(bvalid), .axi_wd_bready(bready),
    .axi_rvalid(arvalid), .axi_rready(arready), .axi_rid(arid), .axi_raddr(araddr),
    .axi_rlen(arlen), .axi_rsize(arsize), .axi_rburst(arburst),
    .axi_rd_valid(rvalid), .axi_rd_rready(rready), .axi_rd_rid(rid), .axi_rd_data(rdata),
    .axi_rd_resp(rresp), .axi_rd_last(rlast), .axi_rd_addr(rd_addr),
    .fill_done, .test_stop, .rd_mismatch);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  logic [31:0] mem [logic [31:0]];
  int n_wr = 0, n_ar = 0, n_rdone = 0, max_out = 0;
  logic [31:0] ar_q [$]; logic [3:0] arid_q [$];

  // write slave
  initial begin
    awready = 0; wready = 0; bvalid = 0; bid = 0; bresp = 0;
    forever begin
      logic [31:0] a; logic [3:0] id;
      @(negedge aclk); awready = ($urandom % 3 != 0);
      @(posedge aclk);
      if (awvalid && awready) begin
        check(awlen == 7 && awsize == 2 && awburst == 2'b01, "write burst shape");
        if (!fill_done) check(awaddr <= AREA, "fill stays in the area");
        a = awaddr; id = awid;
        @(negedge aclk); awready = 0;
        for (int i = 0; i < 8; ) begin
          @(negedge aclk); wready = ($urandom % 3 != 0);
          @(posedge aclk);
          if (wvalid && wready) begin
            check(wstrb == 4'hF && wlast == (i == 7), "strobe/last");
            mem[a + 32'(4*i)] = wdata; i++;
          end
        end
        @(negedge aclk); wready = 0; bvalid = 1; bid = id;
        do @(posedge aclk); while (!bready);
        @(negedge aclk); bvalid = 0; n_wr++;
      end
    end
  end

  // read address slave
  initial begin
    arready = 0;
    forever begin
      @(negedge aclk); arready = ($urandom % 2 == 0);
      @(posedge aclk);
      if (arvalid && arready) begin
        check(arid == 4'(n_ar), $sformatf("read ID %0d", arid));
        check(fill_done, "reads only after fill_done");
        ar_q.push_back(araddr); arid_q.push_back(arid); n_ar++;
        if (n_ar - n_rdone > max_out) max_out = n_ar - n_rdone;
      end
    end
  end

  // read data slave, in order
  initial begin
    rvalid = 0; rlast = 0; rdata = 0; rid = 0; rresp = 0; rd_addr = 0;
    forever begin
      @(negedge aclk);
      if (ar_q.size() > 0) begin
        logic [31:0] a;
        repeat ($urandom % 6) @(negedge aclk);
        a = ar_q.pop_front(); rid = arid_q.pop_front(); rd_addr = a;
        for (int i = 0; i < 8; i++) begin
          rvalid = 1; rdata = mem.exists(a + 32'(4*i)) ? mem[a + 32'(4*i)] : 32'hDEAD; rlast = (i == 7);
          do @(posedge aclk); while (!rready);
          @(negedge aclk);
        end
        rvalid = 0; rlast = 0; n_rdone++;
      end
    end
  end

  initial begin
    repeat (3) @(posedge aclk); aresetn = 1;
    repeat (20) @(posedge aclk);
    check(n_wr == 0 && n_ar == 0 && !awvalid, "idle before init_calib_complete");
    @(negedge aclk); init = 1;
    wait (fill_done);
    repeat (2) @(negedge aclk);
    check(n_wr == AREA/32 + 1, $sformatf("fill bursts %0d", n_wr));
    for (int j = 0; j < AREA/4 + 8; j++) check(mem.exists(4*j) && mem[4*j] == j, $sformatf("fill word %0d", j));
    wait (test_stop);
    for (int k = 0; k < AREA/64; k++)
      for (int i = 0; i < 8; i++) begin
        int a, b;
        a = 8*k + i; b = AREA/8 + 8*k + i;
        check(mem.exists(32'h1000_0000 + 32*k + 4*i) && mem[32'h1000_0000 + 32*k + 4*i] == a + 3*b,
              $sformatf("triad op %0d word %0d", k, i));
      end
    check(n_ar == AREA/32, $sformatf("reads %0d", n_ar));
    check(max_out <= MAXO && max_out > 1, $sformatf("outstanding reads peaked at %0d", max_out));
    check(rd_mismatch == 0, "rd_mismatch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge aclk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
