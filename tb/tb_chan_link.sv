// tb_chan_link: one direction of the parallel channel, chan_link_tx feeding
// chan_link_rx. 200 random frames (read commands of one word, writes of five)
// are sent. The receiver's room inputs are turned off at random, so frames are
// refused with DST_DSC_N and must be resent; in some frames the testbench
// stalls the link in the middle for longer than the source's timeout, so the
// source must cancel with SRC_DSC_N and resend. Every frame must arrive once,
// whole and in order; refusals and cancellations are counted and must occur.
module tb_chan_link;
  import mas_pkg::*;
  localparam int TO = 8;
  logic clk = 0, rst_n = 1;
  // reset starts high and falls at 1 ns, so the asynchronous resets see an edge
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  logic frm_valid, frm_done, ev_refused, ev_cancel;
  logic [2:0] frm_len;
  logic [4:0][63:0] frm_words;
  ch_fwd_t tx_fwd, rx_fwd;
  ch_bwd_t tx_bwd, rx_bwd;
  logic room_rd, room_wr, r_valid, r_ack, ev_refuse, ev_drop;
  logic [4:0][63:0] r_words;
  logic stall;

  chan_link_tx #(.TIMEOUT(TO)) u_tx (.clk, .rst_n, .frm_valid, .frm_len, .frm_words, .frm_done,
    .tx_fwd, .tx_bwd, .ev_refused, .ev_cancel);
  chan_link_rx u_rx (.clk, .rst_n, .rx_fwd, .rx_bwd, .room_rd, .room_wr,
    .frm_valid(r_valid), .frm_words(r_words), .frm_ack(r_ack), .ev_refuse, .ev_drop);

  // The testbench can block the link: the source sees "not ready" and the
  // destination sees no valid word.
  always_comb begin
    rx_fwd = tx_fwd;
    tx_bwd = rx_bwd;
    if (stall) begin
      rx_fwd.src_rdy_n = 1'b1;
      tx_bwd.dst_rdy_n = 1'b1;
    end
  end

  int checks = 0, failures = 0, n_ref = 0, n_can = 0, n_rx = 0;
  logic [4:0][63:0] sent [$];
  logic [2:0] lens [$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  always @(posedge clk) begin
    if (ev_refused) n_ref++;
    if (ev_cancel)  n_can++;
    room_rd <= ($urandom % 4 != 0);
    room_wr <= ($urandom % 4 != 0);
  end

  // receiver side: take frames after a random delay
  initial begin
    r_ack = 0;
    forever begin
      @(negedge clk);
      r_ack = 0;
      if (r_valid && ($urandom % 2 == 0)) begin
        logic [2:0] l;
        r_ack = 1;
        check(sent.size() > 0, "frame with nothing sent");
        l = lens.pop_front();
        for (int i = 0; i < int'(l); i++)
          check(r_words[i] == sent[0][i], $sformatf("frame %0d word %0d", n_rx, i));
        check(hdr_is_read(r_words[0]) == (l == 3'd1), "kind matches length");
        void'(sent.pop_front());
        n_rx++;
      end
    end
  end

  initial begin
    frm_valid = 0; frm_len = 1; frm_words = '0; stall = 0; room_rd = 1; room_wr = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 200; f++) begin
      logic rd;
      logic [4:0][63:0] w;
      rd = $urandom % 2;
      for (int i = 0; i < 5; i++) w[i] = {$urandom, $urandom};
      w[0] = make_header($urandom, 4'(f), rd);
      @(negedge clk);
      frm_words = w; frm_len = rd ? 3'd1 : 3'd5; frm_valid = 1;
      sent.push_back(w); lens.push_back(frm_len);
      // every 10th write frame: block the link in the middle of the frame
      if (!rd && f % 10 == 0) begin
        wait (u_tx.idx == 3'd2);
        @(negedge clk); stall = 1;
        repeat (TO + 4) @(negedge clk);
        stall = 0;
      end
      do @(posedge clk); while (!frm_done);
      @(negedge clk); frm_valid = 0;
    end
    repeat (20) @(posedge clk);
    check(n_rx == 200, $sformatf("frames received %0d", n_rx));
    check(n_ref > 0, "refusals (DST_DSC_N) happened");
    check(n_can > 0, "cancellations (SRC_DSC_N) happened");
    $display("refused %0d, cancelled %0d", n_ref, n_can);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
