// tb_top: end-to-end test of the memory accessing system. Six complete
// systems run side by side, one per stimulus kernel (COPY, ADD, SCALE, TRIAD,
// GUPS) and a sixth running TRIAD with eight register stages in each channel
// direction (CH_DELAY = 8), each through fill, kernel and read-back check. The FIFOs are kept
// small (16 x 32 on the processor side, 4 x 64 on the memory side) with two
// outstanding reads and a stalling DDR3 controller model, so that the
// channel's DST_DSC_N refusal, AXI back-pressure and round-robin switching
// all happen; each is counted and must occur at least once. The three clocks
// run at unrelated periods (aclk 10 ns, ch_clk 7 ns, ui_clk 5 ns; 40 ns for
// the COPY and delayed-channel systems, whose slow memory side forces
// request refusals).
module tb_top;
  import mas_pkg::*;

  logic aclk = 0, ch_clk = 0, ui_clk = 0, rst_n = 1;
  // reset starts high and falls at 1 ns, so the asynchronous resets see an edge
  initial #1 rst_n = 0;
  always #5   aclk   = ~aclk;
  always #3.5 ch_clk = ~ch_clk;
  always #2.5 ui_clk = ~ui_clk;
  // the COPY system's memory side runs eight times slower, so write frames
  // pile up in front of it and the receiver must refuse some of them
  logic ui_slow = 0;
  always #20  ui_slow = ~ui_slow;

  localparam int N = 6;
  logic [N-1:0] done;
  int c [N], f [N], wrf [N], rdf [N], rdatf [N], rr [N], reqr [N], retr [N], aws [N], migs [N];

  tb_top_env #(.MODE(MODE_COPY))  e0 (.aclk, .ch_clk, .ui_clk(ui_slow), .rst_n, .done(done[0]), .checks(c[0]), .failures(f[0]),
    .n_wr_frames(wrf[0]), .n_rd_frames(rdf[0]), .n_rdat_frames(rdatf[0]), .n_rr_switch(rr[0]),
    .n_req_refused(reqr[0]), .n_ret_refused(retr[0]), .n_aw_stall(aws[0]), .n_mig_stall(migs[0]));
  tb_top_env #(.MODE(MODE_ADD))   e1 (.aclk, .ch_clk, .ui_clk, .rst_n, .done(done[1]), .checks(c[1]), .failures(f[1]),
    .n_wr_frames(wrf[1]), .n_rd_frames(rdf[1]), .n_rdat_frames(rdatf[1]), .n_rr_switch(rr[1]),
    .n_req_refused(reqr[1]), .n_ret_refused(retr[1]), .n_aw_stall(aws[1]), .n_mig_stall(migs[1]));
  tb_top_env #(.MODE(MODE_SCALE)) e2 (.aclk, .ch_clk, .ui_clk, .rst_n, .done(done[2]), .checks(c[2]), .failures(f[2]),
    .n_wr_frames(wrf[2]), .n_rd_frames(rdf[2]), .n_rdat_frames(rdatf[2]), .n_rr_switch(rr[2]),
    .n_req_refused(reqr[2]), .n_ret_refused(retr[2]), .n_aw_stall(aws[2]), .n_mig_stall(migs[2]));
  tb_top_env #(.MODE(MODE_TRIAD)) e3 (.aclk, .ch_clk, .ui_clk, .rst_n, .done(done[3]), .checks(c[3]), .failures(f[3]),
    .n_wr_frames(wrf[3]), .n_rd_frames(rdf[3]), .n_rdat_frames(rdatf[3]), .n_rr_switch(rr[3]),
    .n_req_refused(reqr[3]), .n_ret_refused(retr[3]), .n_aw_stall(aws[3]), .n_mig_stall(migs[3]));
  tb_top_env #(.MODE(MODE_GUPS))  e4 (.aclk, .ch_clk, .ui_clk, .rst_n, .done(done[4]), .checks(c[4]), .failures(f[4]),
    .n_wr_frames(wrf[4]), .n_rd_frames(rdf[4]), .n_rdat_frames(rdatf[4]), .n_rr_switch(rr[4]),
    .n_req_refused(reqr[4]), .n_ret_refused(retr[4]), .n_aw_stall(aws[4]), .n_mig_stall(migs[4]));
  // a sixth system with eight register stages in each channel direction
  tb_top_env #(.MODE(MODE_TRIAD), .CH_DELAY(8)) e5 (.aclk, .ch_clk, .ui_clk(ui_slow), .rst_n, .done(done[5]),
    .checks(c[5]), .failures(f[5]),
    .n_wr_frames(wrf[5]), .n_rd_frames(rdf[5]), .n_rdat_frames(rdatf[5]), .n_rr_switch(rr[5]),
    .n_req_refused(reqr[5]), .n_ret_refused(retr[5]), .n_aw_stall(aws[5]), .n_mig_stall(migs[5]));

  int checks, failures;

  task automatic mech(input string name, input int n);
    checks++;
    $display("  %-28s %0d", name, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", name);
    end
  endtask

  initial begin
    int s_rr, s_reqr, s_retr, s_aws, s_migs, s_wr, s_rd;
    repeat (10) @(posedge aclk);
    rst_n = 1;
    wait (&done);
    checks = 0; failures = 0;
    s_rr = 0; s_reqr = 0; s_retr = 0; s_aws = 0; s_migs = 0; s_wr = 0; s_rd = 0;
    for (int i = 0; i < N; i++) begin
      checks += c[i]; failures += f[i];
      s_rr += rr[i]; s_reqr += reqr[i]; s_retr += retr[i]; s_aws += aws[i]; s_migs += migs[i];
      s_wr += wrf[i]; s_rd += rdf[i];
    end
    $display("mechanisms, all six systems (finished at %0t):", $time);
    mech("write frames", s_wr);
    mech("read frames", s_rd);
    mech("round-robin switches", s_rr);
    mech("request frames refused", s_reqr);
    mech("read-data frames refused", s_retr);
    mech("AXI write back-pressure", s_aws);
    mech("controller stalls", s_migs);
    mech("frames refused, delayed channel", reqr[5] + retr[5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge aclk);
    $display("FAIL watchdog expired, done=%b", done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
