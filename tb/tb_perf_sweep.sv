// tb_perf_sweep: the three performance experiments on the memory accessing
// system, at the full 16 KiB test area with the COPY kernel (513 fill bursts,
// 512 copies), every system checked word by word as in the end-to-end test.
//   * channel delay: CH_DELAY = 0, 4, 8, 16, 32 register stages per direction
//   * buffer size: memory-side FIFOs of 16, 32, 4096, 8192 x 64 bits
//     (0.125, 0.25, 32 and 64 KB)
//   * channel clock period: 5, 10, 15, 20 ns
// Each configuration is one system with its own clocks; aclk is 10 ns and
// ui_clk 5 ns throughout, the controller model does not stall, and the
// configurations not being varied stay at the defaults (no delay, 2048-deep
// memory-side FIFOs, 7 ns channel clock for the delay and buffer sweeps).
// The time at which each system finishes is printed. Besides the data checks,
// the run time must not fall as the delay grows or as the channel clock
// slows; buffer-size times are reported only.
module tb_perf_sweep;
  import mas_pkg::*;

  logic aclk = 0, ui_clk = 0, rst_n = 1;
  // reset starts high and falls at 1 ns, so the asynchronous resets see an edge
  initial #1 rst_n = 0;
  always #5   aclk   = ~aclk;
  always #2.5 ui_clk = ~ui_clk;
  logic ch7 = 0, ch5 = 0, ch10 = 0, ch15 = 0, ch20 = 0;
  always #3.5 ch7  = ~ch7;
  always #2.5 ch5  = ~ch5;
  always #5   ch10 = ~ch10;
  always #7.5 ch15 = ~ch15;
  always #10  ch20 = ~ch20;

  localparam int N = 12;
  localparam int unsigned AREA = 32'h4000;
  logic [N-1:0] done;
  int c [N], f [N], unused_i [N][8];
  longint t_done [N];

  // 0..4: delay sweep
  tb_top_env #(.MODE(MODE_COPY), .AREA_BYTES(AREA), .SEND_DEPTH(4096), .RECV_DEPTH(2048), .MAX_OUT(16),
               .STALL(0), .CH_DELAY(0))  d0  (.aclk, .ch_clk(ch7), .ui_clk, .rst_n, .done(done[0]), .checks(c[0]), .failures(f[0]),
    .n_wr_frames(unused_i[0][0]), .n_rd_frames(unused_i[0][1]), .n_rdat_frames(unused_i[0][2]), .n_rr_switch(unused_i[0][3]),
    .n_req_refused(unused_i[0][4]), .n_ret_refused(unused_i[0][5]), .n_aw_stall(unused_i[0][6]), .n_mig_stall(unused_i[0][7]));
  tb_top_env #(.MODE(MODE_COPY), .AREA_BYTES(AREA), .SEND_DEPTH(4096), .RECV_DEPTH(2048), .MAX_OUT(16),
               .STALL(0), .CH_DELAY(4))  d4  (.aclk, .ch_clk(ch7), .ui_clk, .rst_n, .done(done[1]), .checks(c[1]), .failures(f[1]),
    .n_wr_frames(unused_i[1][0]), .n_rd_frames(unused_i[1][1]), .n_rdat_frames(unused_i[1][2]), .n_rr_switch(unused_i[1][3]),
    .n_req_refused(unused_i[1][4]), .n_ret_refused(unused_i[1][5]), .n_aw_stall(unused_i[1][6]), .n_mig_stall(unused_i[1][7]));
  tb_top_env #(.MODE(MODE_COPY), .AREA_BYTES(AREA), .SEND_DEPTH(4096), .RECV_DEPTH(2048), .MAX_OUT(16),
               .STALL(0), .CH_DELAY(8))  d8  (.aclk, .ch_clk(ch7), .ui_clk, .rst_n, .done(done[2]), .checks(c[2]), .failures(f[2]),
    .n_wr_frames(unused_i[2][0]), .n_rd_frames(unused_i[2][1]), .n_rdat_frames(unused_i[2][2]), .n_rr_switch(unused_i[2][3]),
    .n_req_refused(unused_i[2][4]), .n_ret_refused(unused_i[2][5]), .n_aw_stall(unused_i[2][6]), .n_mig_stall(unused_i[2][7]));
  tb_top_env #(.MODE(MODE_COPY), .AREA_BYTES(AREA), .SEND_DEPTH(4096), .RECV_DEPTH(2048), .MAX_OUT(16),
               .STALL(0), .CH_DELAY(16)) d16 (.aclk, .ch_clk(ch7), .ui_clk, .rst_n, .done(done[3]), .checks(c[3]), .failures(f[3]),
    .n_wr_frames(unused_i[3][0]), .n_rd_frames(unused_i[3][1]), .n_rdat_frames(unused_i[3][2]), .n_rr_switch(unused_i[3][3]),
    .n_req_refused(unused_i[3][4]), .n_ret_refused(unused_i[3][5]), .n_aw_stall(unused_i[3][6]), .n_mig_stall(unused_i[3][7]));
  tb_top_env #(.MODE(MODE_COPY), .AREA_BYTES(AREA), .SEND_DEPTH(4096), .RECV_DEPTH(2048), .MAX_OUT(16),
               .STALL(0), .CH_DELAY(32)) d32 (.aclk, .ch_clk(ch7), .ui_clk, .rst_n, .done(done[4]), .checks(c[4]), .failures(f[4]),
    .n_wr_frames(unused_i[4][0]), .n_rd_frames(unused_i[4][1]), .n_rdat_frames(unused_i[4][2]), .n_rr_switch(unused_i[4][3]),
    .n_req_refused(unused_i[4][4]), .n_ret_refused(unused_i[4][5]), .n_aw_stall(unused_i[4][6]), .n_mig_stall(unused_i[4][7]));
  // 5..8: buffer sweep (memory-side FIFO depth in 64-bit words)
  tb_top_env #(.MODE(MODE_COPY), .AREA_BYTES(AREA), .SEND_DEPTH(4096), .RECV_DEPTH(16), .MAX_OUT(16),
               .STALL(0)) b16   (.aclk, .ch_clk(ch7), .ui_clk, .rst_n, .done(done[5]), .checks(c[5]), .failures(f[5]),
    .n_wr_frames(unused_i[5][0]), .n_rd_frames(unused_i[5][1]), .n_rdat_frames(unused_i[5][2]), .n_rr_switch(unused_i[5][3]),
    .n_req_refused(unused_i[5][4]), .n_ret_refused(unused_i[5][5]), .n_aw_stall(unused_i[5][6]), .n_mig_stall(unused_i[5][7]));
  tb_top_env #(.MODE(MODE_COPY), .AREA_BYTES(AREA), .SEND_DEPTH(4096), .RECV_DEPTH(32), .MAX_OUT(16),
               .STALL(0)) b32   (.aclk, .ch_clk(ch7), .ui_clk, .rst_n, .done(done[6]), .checks(c[6]), .failures(f[6]),
    .n_wr_frames(unused_i[6][0]), .n_rd_frames(unused_i[6][1]), .n_rdat_frames(unused_i[6][2]), .n_rr_switch(unused_i[6][3]),
    .n_req_refused(unused_i[6][4]), .n_ret_refused(unused_i[6][5]), .n_aw_stall(unused_i[6][6]), .n_mig_stall(unused_i[6][7]));
  tb_top_env #(.MODE(MODE_COPY), .AREA_BYTES(AREA), .SEND_DEPTH(4096), .RECV_DEPTH(4096), .MAX_OUT(16),
               .STALL(0)) b4096 (.aclk, .ch_clk(ch7), .ui_clk, .rst_n, .done(done[7]), .checks(c[7]), .failures(f[7]),
    .n_wr_frames(unused_i[7][0]), .n_rd_frames(unused_i[7][1]), .n_rdat_frames(unused_i[7][2]), .n_rr_switch(unused_i[7][3]),
    .n_req_refused(unused_i[7][4]), .n_ret_refused(unused_i[7][5]), .n_aw_stall(unused_i[7][6]), .n_mig_stall(unused_i[7][7]));
  tb_top_env #(.MODE(MODE_COPY), .AREA_BYTES(AREA), .SEND_DEPTH(4096), .RECV_DEPTH(8192), .MAX_OUT(16),
               .STALL(0)) b8192 (.aclk, .ch_clk(ch7), .ui_clk, .rst_n, .done(done[8]), .checks(c[8]), .failures(f[8]),
    .n_wr_frames(unused_i[8][0]), .n_rd_frames(unused_i[8][1]), .n_rdat_frames(unused_i[8][2]), .n_rr_switch(unused_i[8][3]),
    .n_req_refused(unused_i[8][4]), .n_ret_refused(unused_i[8][5]), .n_aw_stall(unused_i[8][6]), .n_mig_stall(unused_i[8][7]));
  // 9..11: channel clock period 5, 10, 15 ns (20 ns below)
  tb_top_env #(.MODE(MODE_COPY), .AREA_BYTES(AREA), .SEND_DEPTH(4096), .RECV_DEPTH(2048), .MAX_OUT(16),
               .STALL(0)) p5  (.aclk, .ch_clk(ch5), .ui_clk, .rst_n, .done(done[9]), .checks(c[9]), .failures(f[9]),
    .n_wr_frames(unused_i[9][0]), .n_rd_frames(unused_i[9][1]), .n_rdat_frames(unused_i[9][2]), .n_rr_switch(unused_i[9][3]),
    .n_req_refused(unused_i[9][4]), .n_ret_refused(unused_i[9][5]), .n_aw_stall(unused_i[9][6]), .n_mig_stall(unused_i[9][7]));
  tb_top_env #(.MODE(MODE_COPY), .AREA_BYTES(AREA), .SEND_DEPTH(4096), .RECV_DEPTH(2048), .MAX_OUT(16),
               .STALL(0)) p10 (.aclk, .ch_clk(ch10), .ui_clk, .rst_n, .done(done[10]), .checks(c[10]), .failures(f[10]),
    .n_wr_frames(unused_i[10][0]), .n_rd_frames(unused_i[10][1]), .n_rdat_frames(unused_i[10][2]), .n_rr_switch(unused_i[10][3]),
    .n_req_refused(unused_i[10][4]), .n_ret_refused(unused_i[10][5]), .n_aw_stall(unused_i[10][6]), .n_mig_stall(unused_i[10][7]));
  tb_top_env #(.MODE(MODE_COPY), .AREA_BYTES(AREA), .SEND_DEPTH(4096), .RECV_DEPTH(2048), .MAX_OUT(16),
               .STALL(0)) p15 (.aclk, .ch_clk(ch15), .ui_clk, .rst_n, .done(done[11]), .checks(c[11]), .failures(f[11]),
    .n_wr_frames(unused_i[11][0]), .n_rd_frames(unused_i[11][1]), .n_rdat_frames(unused_i[11][2]), .n_rr_switch(unused_i[11][3]),
    .n_req_refused(unused_i[11][4]), .n_ret_refused(unused_i[11][5]), .n_aw_stall(unused_i[11][6]), .n_mig_stall(unused_i[11][7]));
  logic done20; int c20, f20, unused20 [8]; longint t20;
  tb_top_env #(.MODE(MODE_COPY), .AREA_BYTES(AREA), .SEND_DEPTH(4096), .RECV_DEPTH(2048), .MAX_OUT(16),
               .STALL(0)) p20 (.aclk, .ch_clk(ch20), .ui_clk, .rst_n, .done(done20), .checks(c20), .failures(f20),
    .n_wr_frames(unused20[0]), .n_rd_frames(unused20[1]), .n_rdat_frames(unused20[2]), .n_rr_switch(unused20[3]),
    .n_req_refused(unused20[4]), .n_ret_refused(unused20[5]), .n_aw_stall(unused20[6]), .n_mig_stall(unused20[7]));

  for (genvar i = 0; i < N; i++) begin : g_t
    initial begin
      wait (rst_n === 1'b0);
      wait (rst_n === 1'b1);
      wait (done[i] === 1'b1);
      t_done[i] = $time;
    end
  end
  initial begin
    wait (rst_n === 1'b0);
    wait (rst_n === 1'b1);
    wait (done20 === 1'b1);
    t20 = $time;
  end

  int checks = 0, failures = 0;
  task automatic trend(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (10) @(posedge aclk);
    rst_n = 1;
    wait ((&done) && done20 === 1'b1);
    #1;
    for (int i = 0; i < N; i++) begin checks += c[i]; failures += f[i]; end
    checks += c20; failures += f20;
    $display("run time to the last checked write (us):");
    $display("  channel delay  0: %0d   4: %0d   8: %0d   16: %0d   32: %0d",
             t_done[0] / 1000, t_done[1] / 1000, t_done[2] / 1000, t_done[3] / 1000, t_done[4] / 1000);
    $display("  buffer 0.125 KB: %0d   0.25 KB: %0d   16 KB: %0d   32 KB: %0d   64 KB: %0d",
             t_done[5] / 1000, t_done[6] / 1000, t_done[0] / 1000, t_done[7] / 1000, t_done[8] / 1000);
    $display("  channel period 5 ns: %0d   7 ns: %0d   10 ns: %0d   15 ns: %0d   20 ns: %0d",
             t_done[9] / 1000, t_done[0] / 1000, t_done[10] / 1000, t_done[11] / 1000, t20 / 1000);
    for (int i = 1; i < 5; i++) trend(t_done[i] >= t_done[i-1], $sformatf("delay step %0d not slower", i));
    trend(t_done[4] > t_done[0], "32 delay stages slower than none");
    trend(t_done[0] >= t_done[9] && t_done[10] >= t_done[0] && t_done[11] >= t_done[10] && t20 >= t_done[11],
          "slower channel clock never faster");
    trend(t20 > t_done[9], "20 ns channel slower than 5 ns");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge aclk);
    $display("FAIL watchdog expired, done=%b %b", done, done20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
