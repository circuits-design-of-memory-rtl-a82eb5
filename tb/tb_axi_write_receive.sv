// tb_axi_write_receive: drives 40 random write bursts (random ID, address
// and data, random gaps between beats) into the AXI write slave and records
// what it pushes into the write data/command FIFO and the write label FIFO.
// Each burst must appear as {27'b0, ID, 0}, address, eight data words, with
// BRESP = OKAY and the right BID, and exactly one label after the response.
// For some bursts the FIFO reports too little room, and AWREADY must stay low
// until room for the whole burst is back.
module tb_axi_write_receive;
  import mas_pkg::*;
  logic aclk = 0, aresetn = 1;
  // reset starts high and falls at 1 ns, so the asynchronous resets see an edge
  initial #1 aresetn = 0;
  always #5 aclk = ~aclk;

  logic awvalid, awready, wvalid, wready, wlast, bvalid, bready;
  logic [3:0] awid, wid, bid, wstrb;
  logic [31:0] awaddr, wdata;
  logic [7:0] awlen; logic [2:0] awsize; logic [1:0] awburst, bresp;
  logic fifo_wen, label_wen, label_full;
  logic [31:0] fifo_wdata, label_wdata;
  logic [12:0] fifo_free;

  axi_write_receive dut (.aclk, .aresetn,
    .axi_wvalid(awvalid), .axi_wready(awready), .axi_wid(awid), .axi_waddr(awaddr),
    .axi_wlen(awlen), .axi_wsize(awsize), .axi_wburst(awburst),
    .axi_wd_valid(wvalid), .axi_wd_ready(wready), .axi_wd_wid(wid), .axi_wd_data(wdata),
    .axi_wd_strb(wstrb), .axi_wd_last(wlast),
    .axi_wd_bid(bid), .axi_wd_bresp(bresp), .axi_wd_bvalid(bvalid), .axi_wd_bready(bready),
    .fifo_wen, .fifo_wdata, .fifo_free, .label_wen, .label_wdata, .label_full);

  int checks = 0, failures = 0;
  logic [31:0] got [$], labels [$];
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  always @(posedge aclk) begin
    if (fifo_wen)  got.push_back(fifo_wdata);
    if (label_wen) labels.push_back(label_wdata);
  end

  initial begin
    awvalid = 0; wvalid = 0; wlast = 0; bready = 0; awid = 0; wid = 0; wstrb = 4'hF;
    awaddr = 0; wdata = 0; awlen = AXI_LEN_32B; awsize = AXI_SIZE_4B; awburst = AXI_BURST_INCR;
    fifo_free = 13'd4096; label_full = 0;
    repeat (3) @(posedge aclk); aresetn = 1;
    for (int b = 0; b < 40; b++) begin
      logic [3:0] id; logic [31:0] a; logic [31:0] d [8];
      id = $urandom; a = $urandom & ~32'h1F;
      for (int i = 0; i < 8; i++) d[i] = $urandom;
      @(negedge aclk);
      if (b % 5 == 0) begin
        fifo_free = 13'd9;               // one word short of a burst
        awvalid = 1; awid = id; awaddr = a;
        repeat (6) begin @(posedge aclk); check(!awready, "no AWREADY without room"); @(negedge aclk); end
        fifo_free = 13'd4096;
      end
      awvalid = 1; awid = id; awaddr = a;
      do @(posedge aclk); while (!awready);
      @(negedge aclk); awvalid = 0;
      for (int i = 0; i < 8; i++) begin
        while ($urandom % 3 == 0) @(negedge aclk);
        wvalid = 1; wdata = d[i]; wid = id; wlast = (i == 7);
        do @(posedge aclk); while (!wready);
        @(negedge aclk); wvalid = 0; wlast = 0;
      end
      bready = ($urandom % 2);
      while (!(bvalid && bready)) begin @(negedge aclk); bready = ($urandom % 2); end
      check(bid == id && bresp == AXI_RESP_OKAY, $sformatf("burst %0d response id %h resp %h", b, bid, bresp));
      @(posedge aclk); @(negedge aclk); bready = 0;
      repeat (2) @(posedge aclk);
      check(got.size() == 10, $sformatf("burst %0d pushed %0d words", b, got.size()));
      if (got.size() == 10) begin
        check(got[0] == {27'b0, id, 1'b0}, "command word");
        check(got[1] == a, "address word");
        for (int i = 0; i < 8; i++) check(got[2+i] == d[i], $sformatf("data word %0d", i));
      end
      check(labels.size() == 1 && labels[0] == {27'b0, id, 1'b0}, "one label per burst");
      got.delete(); labels.delete();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge aclk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
