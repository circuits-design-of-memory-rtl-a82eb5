// tb_async_fifo: dual-clock FIFO test. Write clock 10 ns, read clock 7 ns.
// Phase 1 fills the FIFO with the reader stopped and checks that exactly
// DEPTH words fit, that full and wfree agree, and that rcount reaches DEPTH.
// Phase 2 streams 3000 random words with random push/pop enables and checks
// order and contents against a reference queue.
module tb_async_fifo;
  localparam int W = 32, D = 16;
  logic wclk = 0, rclk = 0, wrst_n = 1, rrst_n = 1;
  // reset starts high and falls at 1 ns, so the asynchronous resets see an edge
  initial begin #1 wrst_n = 0; rrst_n = 0; end
  always #5   wclk = ~wclk;
  always #3.5 rclk = ~rclk;

  logic wen, ren, full, empty;
  logic [W-1:0] wdata, rdata;
  logic [$clog2(D):0] wfree, rcount;

  async_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  int checks = 0, failures = 0;
  logic [W-1:0] q [$];
  int n_pushed = 0, n_popped = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  // writer
  initial begin
    wen = 0; wdata = 0; ren = 0;
    repeat (3) @(posedge wclk);
    wrst_n = 1; rrst_n = 1;
    repeat (3) @(posedge wclk);
    check(wfree == D && !full, "empty FIFO reports all free");
    // phase 1: fill with the reader stopped
    for (int i = 0; i < D + 4; i++) begin
      @(negedge wclk);
      wen = !full; wdata = 32'hA000 + i;
      if (!full) q.push_back(32'hA000 + i);
    end
    @(negedge wclk);
    wen = 0;
    @(negedge wclk);
    check(full && wfree == 0, $sformatf("full after %0d pushes (wfree %0d)", q.size(), wfree));
    check(q.size() == D, $sformatf("exactly DEPTH words fit: %0d", q.size()));
    repeat (4) @(posedge rclk);
    check(rcount == D, $sformatf("rcount %0d", rcount));
    // phase 2: random traffic
    fork
      begin
        for (int i = 0; i < 3000; ) begin
          @(negedge wclk);
          wen = !full && ($urandom % 3 != 0);
          wdata = $urandom;
          @(posedge wclk);
          if (wen) begin q.push_back(wdata); i++; end
        end
        @(negedge wclk); wen = 0;
      end
      begin
        while (n_popped < D + 3000) begin
          @(negedge rclk);
          ren = !empty && ($urandom % 4 != 0);
          if (ren) begin
            check(q.size() > 0 && rdata == q[0], $sformatf("word %0d: got %h want %h", n_popped, rdata, q[0]));
            void'(q.pop_front());
            n_popped++;
          end
          @(posedge rclk);
        end
        @(negedge rclk); ren = 0;
      end
    join
    repeat (5) @(posedge rclk);
    check(empty && rcount == 0, "empty at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge wclk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
