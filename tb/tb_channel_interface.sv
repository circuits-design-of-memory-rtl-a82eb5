// tb_channel_interface: both paths of the receiving side's channel end.
// Request path: 40 random frames (writes of five words, reads of one) are
// sent; writes must land as four words in the write data FIFO followed by the
// header in the write command FIFO, reads as the header in the read command
// FIFO. The write data FIFO model is sometimes short of room, so writes are
// refused with DST_DSC_N and resent. Return path: 20 bursts are loaded into
// models of the read command keep FIFO (header), the read data FIFO (four
// words) and the read data label FIFO; each must leave as one five-word frame
// {header, data0..data3} with SOF/EOF framing.
module tb_channel_interface;
  import mas_pkg::*;
  logic clk = 0, rst_n = 1;
  // reset starts high and falls at 1 ns, so the asynchronous resets see an edge
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  ch_fwd_t rx_fwd, tx_fwd; ch_bwd_t rx_bwd, tx_bwd;
  logic wdat_wen, wcmd_wen, rcmd_wen, keep_ren, rdat_ren, rlab_ren;
  logic [63:0] wdat_wdata, wcmd_wdata, rcmd_wdata, keep_rdata, rdat_rdata;
  logic [11:0] wdat_free;
  logic keep_empty, rdat_empty, rlab_empty;
  logic e0, e1, e2, e3, e4, e5, e6;

  channel_interface dut (.clk, .rst_n, .rx_fwd, .rx_bwd, .tx_fwd, .tx_bwd,
    .wdat_wen, .wdat_wdata, .wdat_free, .wcmd_wen, .wcmd_wdata, .wcmd_full(1'b0),
    .rcmd_wen, .rcmd_wdata, .rcmd_full(1'b0),
    .keep_empty, .keep_ren, .keep_rdata, .rdat_empty, .rdat_ren, .rdat_rdata,
    .rlab_empty, .rlab_ren,
    .ev_wr_frame(e0), .ev_rd_frame(e1), .ev_refuse(e2), .ev_drop(e3), .ev_rdat_frame(e4),
    .ev_refused(e5), .ev_cancel(e6));

  int checks = 0, failures = 0, nref = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  // request-path FIFO models
  logic [63:0] wd_q [$], wc_q [$], rc_q [$];
  always @(posedge clk) begin
    if (wdat_wen) wd_q.push_back(wdat_wdata);
    if (wcmd_wen) wc_q.push_back(wcmd_wdata);
    if (rcmd_wen) rc_q.push_back(rcmd_wdata);
    if (e2) nref++;
    wdat_free <= ($urandom % 3 == 0) ? 12'd3 : 12'd2048;
  end

  // return-path FIFO models
  localparam int NB = 20;
  logic [63:0] kmem [NB]; logic [63:0] dmem [NB*4];
  int kh = 0, kt = 0, dh = 0, dt = 0, nl = 0;
  assign keep_empty = (kh == kt); assign keep_rdata = kmem[kh % NB];
  assign rdat_empty = (dh == dt); assign rdat_rdata = dmem[dh % (NB*4)];
  assign rlab_empty = (nl == 0);
  always @(posedge clk) begin
    if (keep_ren && !keep_empty) kh <= kh + 1;
    if (rdat_ren && !rdat_empty) dh <= dh + 1;
    if (rlab_ren && nl > 0) nl <= nl - 1;
  end

  // return-path destination: always ready, collects frames
  assign tx_bwd = '{dst_rdy_n: 1'b0, dst_dsc_n: 1'b1};
  logic [63:0] rf [$]; int nframes = 0; int fi = 0; logic framing_ok = 1;
  always @(posedge clk) if (!tx_fwd.src_rdy_n) begin
    if ((fi == 0) != !tx_fwd.sof_n) framing_ok = 0;
    if ((fi == 4) != !tx_fwd.eof_n) framing_ok = 0;
    rf.push_back(tx_fwd.data);
    fi = (fi == 4) ? 0 : fi + 1;
    if (fi == 0) nframes++;
  end

  task automatic send(input logic [63:0] w [5], input int len);
    bit ok;
    do begin
      ok = 1;
      for (int i = 0; i < len; i++) begin
        @(negedge clk);
        rx_fwd.data = w[i]; rx_fwd.src_rdy_n = 0;
        rx_fwd.sof_n = (i != 0); rx_fwd.eof_n = (i != len - 1);
        do @(posedge clk); while (rx_bwd.dst_rdy_n);
        #1;
        if (!rx_bwd.dst_dsc_n) begin ok = 0; break; end
      end
      @(negedge clk); rx_fwd = CH_FWD_IDLE;
      @(posedge clk); #1;
      if (!rx_bwd.dst_dsc_n) ok = 0;
    end while (!ok);
  endtask

  initial begin
    logic [63:0] exp_wd [$], exp_wc [$], exp_rc [$], exp_rf [$];
    rx_fwd = CH_FWD_IDLE; wdat_free = 12'd2048;
    repeat (3) @(posedge clk); rst_n = 1;
    fork
      for (int f = 0; f < 40; f++) begin
        logic [63:0] w [5]; logic rd;
        rd = $urandom % 2;
        w[0] = make_header($urandom, 4'(f), rd);
        for (int i = 1; i < 5; i++) w[i] = {$urandom, $urandom};
        if (rd) exp_rc.push_back(w[0]);
        else begin for (int i = 1; i < 5; i++) exp_wd.push_back(w[i]); exp_wc.push_back(w[0]); end
        send(w, rd ? 1 : 5);
      end
      for (int b = 0; b < NB; b++) begin
        repeat ($urandom % 8) @(negedge clk);
        @(negedge clk);
        kmem[kt % NB] = make_header($urandom, 4'(b), 1'b1); exp_rf.push_back(kmem[kt % NB]);
        for (int i = 0; i < 4; i++) begin dmem[(dt + i) % (NB*4)] = {$urandom, $urandom}; exp_rf.push_back(dmem[(dt + i) % (NB*4)]); end
        kt = kt + 1; dt = dt + 4;
        @(negedge clk); nl = nl + 1;
      end
    join
    repeat (30) @(posedge clk);
    check(wd_q.size() == exp_wd.size() && wc_q.size() == exp_wc.size() && rc_q.size() == exp_rc.size(),
          $sformatf("FIFO pushes %0d/%0d/%0d", wd_q.size(), wc_q.size(), rc_q.size()));
    foreach (exp_wd[i]) check(i < wd_q.size() && wd_q[i] == exp_wd[i], $sformatf("write data %0d", i));
    foreach (exp_wc[i]) check(i < wc_q.size() && wc_q[i] == exp_wc[i], $sformatf("write command %0d", i));
    foreach (exp_rc[i]) check(i < rc_q.size() && rc_q[i] == exp_rc[i], $sformatf("read command %0d", i));
    check(nframes == NB && rf.size() == exp_rf.size(), $sformatf("return frames %0d", nframes));
    foreach (exp_rf[i]) check(i < rf.size() && rf[i] == exp_rf[i], $sformatf("return word %0d", i));
    check(framing_ok, "SOF/EOF framing of return frames");
    check(nref > 0, "write frames refused for lack of room");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
