// tb_axi_read_receive: sends 50 random read addresses into the AXI read
// address slave. Each must be pushed into the read command FIFO as
// {27'b0, ARID, 1} followed by the address, then exactly one label. While the
// FIFO reports less than two free words or the label FIFO is full, ARREADY
// must stay low.
module tb_axi_read_receive;
  import mas_pkg::*;
  logic aclk = 0, aresetn = 1;
  // reset starts high and falls at 1 ns, so the asynchronous resets see an edge
  initial #1 aresetn = 0;
  always #5 aclk = ~aclk;

  logic arvalid, arready, fifo_wen, label_wen, label_full;
  logic [3:0] arid; logic [31:0] araddr, fifo_wdata, label_wdata;
  logic [12:0] fifo_free;

  axi_read_receive dut (.aclk, .aresetn, .axi_rvalid(arvalid), .axi_rready(arready), .axi_rid(arid),
    .axi_raddr(araddr), .axi_rlen(AXI_LEN_32B), .axi_rsize(AXI_SIZE_4B), .axi_rburst(AXI_BURST_INCR),
    .fifo_wen, .fifo_wdata, .fifo_free, .label_wen, .label_wdata, .label_full);

  int checks = 0, failures = 0;
  logic [31:0] got [$], labels [$];
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  always @(posedge aclk) begin
    if (aresetn && fifo_wen)  got.push_back(fifo_wdata);
    if (aresetn && label_wen) labels.push_back(label_wdata);
  end

  initial begin
    arvalid = 0; arid = 0; araddr = 0; fifo_free = 13'd4096; label_full = 0;
    repeat (3) @(posedge aclk); aresetn = 1;
    for (int b = 0; b < 50; b++) begin
      logic [3:0] id; logic [31:0] a;
      id = $urandom; a = $urandom;
      @(negedge aclk);
      arvalid = 1; arid = id; araddr = a;
      if (b % 7 == 3) begin
        fifo_free = 13'd1;
        repeat (4) begin @(posedge aclk); check(!arready, "no ARREADY with one free word"); @(negedge aclk); end
        fifo_free = 13'd4096; label_full = 1;
        repeat (4) begin @(posedge aclk); check(!arready, "no ARREADY with label FIFO full"); @(negedge aclk); end
        label_full = 0;
      end
      do @(posedge aclk); while (!arready);
      @(negedge aclk); arvalid = 0;
      repeat (3) @(posedge aclk);
      check(got.size() == 2 && got[0] == {27'b0, id, 1'b1} && got[1] == a, $sformatf("read %0d command words", b));
      check(labels.size() == 1 && labels[0] == {27'b0, id, 1'b1}, "one label");
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
