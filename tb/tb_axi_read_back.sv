// tb_axi_read_back: fills a model of the read data FIFO with 30 bursts
// (command word, address, eight data words each) and a label per burst, then
// takes the AXI read data with a randomly stalling RREADY. Every burst must
// come out as eight beats with the right RID, data, RRESP = OKAY, RLAST on
// the eighth beat only, and the burst's address on axi_rd_addr.
module tb_axi_read_back;
  import mas_pkg::*;
  logic aclk = 0, aresetn = 1;
  // reset starts high and falls at 1 ns, so the asynchronous resets see an edge
  initial #1 aresetn = 0;
  always #5 aclk = ~aclk;

  logic label_empty, label_ren, fifo_empty, fifo_ren;
  logic [31:0] fifo_rdata;
  logic rvalid, rready, rlast; logic [3:0] rid; logic [31:0] rdata, raddr; logic [1:0] rresp;

  axi_read_back dut (.aclk, .aresetn, .label_empty, .label_ren, .fifo_empty, .fifo_ren, .fifo_rdata,
    .axi_rd_valid(rvalid), .axi_rd_rready(rready), .axi_rd_rid(rid), .axi_rd_data(rdata),
    .axi_rd_resp(rresp), .axi_rd_last(rlast), .axi_rd_addr(raddr));

  logic [31:0] fmem [1024];
  int head = 0, tail = 0;
  int nlabels = 0;
  assign label_empty = (nlabels == 0);
  assign fifo_empty  = (head == tail);
  assign fifo_rdata  = fmem[head];
  always @(posedge aclk) begin
    if (fifo_ren && !fifo_empty) head <= head + 1;
    if (label_ren && nlabels > 0) nlabels <= nlabels - 1;
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  logic [3:0] ids [30]; logic [31:0] addrs [30]; logic [31:0] data [30][8];
  initial begin
    rready = 0;
    for (int b = 0; b < 30; b++) begin
      ids[b] = $urandom; addrs[b] = $urandom;
      for (int i = 0; i < 8; i++) data[b][i] = $urandom;
    end
    repeat (3) @(posedge aclk); aresetn = 1;
    fork
      for (int b = 0; b < 30; b++) begin
        repeat ($urandom % 20) @(negedge aclk);
        @(negedge aclk);
        fmem[tail] = {27'b0, ids[b], 1'b1}; fmem[tail+1] = addrs[b];
        for (int i = 0; i < 8; i++) fmem[tail+2+i] = data[b][i];
        tail = tail + 10;
        @(negedge aclk);
        nlabels = nlabels + 1;
      end
      for (int b = 0; b < 30; b++)
        for (int i = 0; i < 8; i++) begin
          @(negedge aclk);
          rready = ($urandom % 3 != 0);
          while (!(rvalid && rready)) begin @(negedge aclk); rready = ($urandom % 3 != 0); end
          check(rdata == data[b][i] && rid == ids[b] && rresp == AXI_RESP_OKAY,
                $sformatf("burst %0d beat %0d: %h id %h", b, i, rdata, rid));
          check(rlast == (i == 7), "RLAST");
          check(raddr == addrs[b], "burst address");
          @(posedge aclk);
        end
    join
    @(negedge aclk); rready = 0;
    check(head == tail && nlabels == 0, "all words and labels consumed");
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
