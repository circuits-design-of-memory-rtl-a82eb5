// tb_channel_send: loads 20 write bursts and 20 read commands into models of
// the sending side's FIFOs (10 and 2 words per burst, one label each) and
// collects the frames that channel_send puts on the channel. The testbench
// destination refuses about one frame in four with DST_DSC_N one cycle after
// its SOF word. Accepted frames must carry the header {address, 27'b0, ID,
// rw} and the data paired low word first, in FIFO order, and while both kinds
// wait, reads and writes must alternate (round-robin).
module tb_channel_send;
  import mas_pkg::*;
  logic clk = 0, rst_n = 1;
  // reset starts high and falls at 1 ns, so the asynchronous resets see an edge
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  logic wl_empty, wl_ren, wf_empty, wf_ren, rl_empty, rl_ren, rf_empty, rf_ren;
  logic [31:0] wf_rdata, rf_rdata;
  ch_fwd_t tx_fwd; ch_bwd_t tx_bwd;
  logic ev_wr, ev_rd, ev_ref, ev_can;

  channel_send dut (.clk, .rst_n, .wlabel_empty(wl_empty), .wlabel_ren(wl_ren),
    .wfifo_empty(wf_empty), .wfifo_ren(wf_ren), .wfifo_rdata(wf_rdata),
    .rlabel_empty(rl_empty), .rlabel_ren(rl_ren), .rfifo_empty(rf_empty), .rfifo_ren(rf_ren),
    .rfifo_rdata(rf_rdata), .tx_fwd, .tx_bwd, .ev_wr_frame(ev_wr), .ev_rd_frame(ev_rd),
    .ev_refused(ev_ref), .ev_cancel(ev_can));

  localparam int N = 20;
  logic [31:0] wmem [N*10]; logic [31:0] rmem [N*2];
  int wh = 0, wt = 0, rh = 0, rt = 0, wl = 0, rl = 0;
  assign wf_empty = (wh == wt); assign wf_rdata = wmem[wh % (N*10)];
  assign rf_empty = (rh == rt); assign rf_rdata = rmem[rh % (N*2)];
  assign wl_empty = (wl == 0);  assign rl_empty = (rl == 0);
  always @(posedge clk) begin
    if (wf_ren && !wf_empty) wh <= wh + 1;
    if (rf_ren && !rf_empty) rh <= rh + 1;
    if (wl_ren && wl > 0) wl <= wl - 1;
    if (rl_ren && rl > 0) rl <= rl - 1;
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  // expected frames
  logic [63:0] wexp [N][5]; logic [63:0] rexp [N];
  int nw = 0, nr = 0, nref = 0, alt = 0;
  logic last_rd; logic any;

  // destination: collect frames, refuse some
  logic [63:0] cur [5]; int ci = 0; logic refuse_next = 0, discarding = 0;
  assign tx_bwd.dst_rdy_n = 1'b0;
  assign tx_bwd.dst_dsc_n = !refuse_next;
  always @(posedge clk) begin
    refuse_next <= 1'b0;
    if (refuse_next) begin discarding <= 1'b1; nref++; end
    if (!tx_fwd.src_rdy_n) begin
      if (!tx_fwd.sof_n) begin
        ci = 0; discarding <= 1'b0;
        refuse_next <= ($urandom % 4 == 0);
      end
      if (!(refuse_next || (discarding && tx_fwd.sof_n))) begin
        if (ci < 5) cur[ci] = tx_fwd.data;
        ci++;
        if (!tx_fwd.eof_n && !(!tx_fwd.sof_n && refuse_next)) begin
          // complete frame (unless refused in the next cycle: checked there)
        end
      end
    end
  end

  // frames are taken as final when the source reports delivery
  always @(posedge clk) begin
    if (ev_wr) begin
      check(!dut.cur_rd, "write event");
      for (int i = 0; i < 5; i++) check(cur[i] == wexp[nw][i], $sformatf("write frame %0d word %0d: %h want %h", nw, i, cur[i], wexp[nw][i]));
      if (any && last_rd) alt++;
      last_rd = 0; any = 1; nw++;
    end
    if (ev_rd) begin
      check(cur[0] == rexp[nr], $sformatf("read frame %0d: %h want %h", nr, cur[0], rexp[nr]));
      if (any && !last_rd) alt++;
      last_rd = 1; any = 1; nr++;
    end
  end

  initial begin
    any = 0; last_rd = 0;
    for (int b = 0; b < N; b++) begin
      logic [3:0] id; logic [31:0] a; logic [31:0] d [8];
      id = $urandom; a = $urandom;
      wmem[b*10] = {27'b0, id, 1'b0}; wmem[b*10+1] = a;
      for (int i = 0; i < 8; i++) begin d[i] = $urandom; wmem[b*10+2+i] = d[i]; end
      wexp[b][0] = {a, 27'b0, id, 1'b0};
      for (int i = 0; i < 4; i++) wexp[b][i+1] = {d[2*i+1], d[2*i]};
      id = $urandom; a = $urandom;
      rmem[b*2] = {27'b0, id, 1'b1}; rmem[b*2+1] = a;
      rexp[b] = {a, 27'b0, id, 1'b1};
    end
    repeat (3) @(posedge clk);
    @(negedge clk);
    wt = N*10; rt = N*2; wl = N; rl = N;
    rst_n = 1;
    wait (nw == N && nr == N);
    repeat (5) @(posedge clk);
    check(alt == 2*N - 1, $sformatf("round-robin: %0d switches in %0d frames", alt, 2*N));
    check(nref > 0, "some frames were refused and resent");
    $display("refused %0d", nref);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog nw=%0d nr=%0d", nw, nr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
