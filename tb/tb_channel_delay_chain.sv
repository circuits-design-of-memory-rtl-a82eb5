// tb_channel_delay_chain: checks the channel register chain at CH_DELAY = 3
// and at CH_DELAY = 0. Random values drive both signal groups every cycle;
// each output must equal its input from exactly CH_DELAY cycles earlier (the
// same cycle for CH_DELAY = 0), and during and right after reset the delayed
// outputs must show the idle channel (all control signals high).
module tb_channel_delay_chain;
  import mas_pkg::*;
  localparam int D = 3;
  logic clk = 0, rst_n = 1;
  // reset starts high and falls at 1 ns, so the asynchronous resets see an edge
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  ch_fwd_t src_fwd, dst_fwd, dst_fwd0;
  ch_bwd_t src_bwd, dst_bwd, src_bwd0;

  channel_delay_chain #(.CH_DELAY(D)) dut (.clk, .rst_n, .src_fwd, .src_bwd, .dst_fwd, .dst_bwd);
  channel_delay_chain #(.CH_DELAY(0)) dut0 (.clk, .rst_n, .src_fwd, .src_bwd(src_bwd0),
    .dst_fwd(dst_fwd0), .dst_bwd);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  ch_fwd_t fwd_hist [$];
  ch_bwd_t bwd_hist [$];

  initial begin
    src_fwd = CH_FWD_IDLE; dst_bwd = '{dst_rdy_n: 1'b1, dst_dsc_n: 1'b1};
    repeat (2) @(posedge clk);
    @(negedge clk);
    check(dst_fwd == CH_FWD_IDLE && src_bwd == '{dst_rdy_n: 1'b1, dst_dsc_n: 1'b1}, "idle in reset");
    rst_n = 1;
    for (int c = 0; c < 500; c++) begin
      @(negedge clk);
      src_fwd = '{data: {$urandom, $urandom}, sof_n: 1'($urandom), eof_n: 1'($urandom),
                  src_rdy_n: 1'($urandom), src_dsc_n: 1'($urandom)};
      dst_bwd = '{dst_rdy_n: 1'($urandom), dst_dsc_n: 1'($urandom)};
      #1;
      check(dst_fwd0 == src_fwd && src_bwd0 == dst_bwd, "direct connection at CH_DELAY 0");
      if (c < D) begin
        check(dst_fwd == CH_FWD_IDLE && src_bwd == '{dst_rdy_n: 1'b1, dst_dsc_n: 1'b1},
              $sformatf("idle in cycle %0d after reset", c));
      end else begin
        check(dst_fwd == fwd_hist[c-D], $sformatf("forward group delayed by %0d, cycle %0d", D, c));
        check(src_bwd == bwd_hist[c-D], $sformatf("backward group delayed by %0d, cycle %0d", D, c));
      end
      fwd_hist.push_back(src_fwd);
      bwd_hist.push_back(dst_bwd);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
