// tb_channel_receive: the testbench acts as the channel source and sends 30
// read-data frames (header plus four 64-bit words) to channel_receive. The
// read data FIFO model reports too little room at random, so some frames are
// refused with DST_DSC_N and are sent again. Every accepted frame must be
// written as ten 32-bit words, low half first, followed by one label carrying
// the header's low word; no frame may be written twice or lost.
module tb_channel_receive;
  import mas_pkg::*;
  logic clk = 0, rst_n = 1;
  // reset starts high and falls at 1 ns, so the asynchronous resets see an edge
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  ch_fwd_t rx_fwd; ch_bwd_t rx_bwd;
  logic fifo_wen, label_wen, label_full, ev_frame, ev_refuse, ev_drop;
  logic [31:0] fifo_wdata, label_wdata;
  logic [12:0] fifo_free;

  channel_receive dut (.clk, .rst_n, .rx_fwd, .rx_bwd, .fifo_wen, .fifo_wdata, .fifo_free,
    .label_wen, .label_wdata, .label_full, .ev_frame, .ev_refuse, .ev_drop);

  int checks = 0, failures = 0, nref = 0;
  logic [31:0] got [$]; logic [31:0] labels [$];
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  always @(posedge clk) begin
    if (fifo_wen) got.push_back(fifo_wdata);
    if (label_wen) labels.push_back(label_wdata);
    if (ev_refuse) nref++;
    fifo_free <= ($urandom % 3 == 0) ? 13'd9 : 13'd4096;
  end

  // Send one frame; resend it whenever DST_DSC_N comes back.
  task automatic send(input logic [63:0] w [5]);
    bit ok;
    do begin
      ok = 1;
      for (int i = 0; i < 5; i++) begin
        @(negedge clk);
        rx_fwd.data = w[i]; rx_fwd.src_rdy_n = 0;
        rx_fwd.sof_n = (i != 0); rx_fwd.eof_n = (i != 4);
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
    rx_fwd = CH_FWD_IDLE; label_full = 0; fifo_free = 13'd4096;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int f = 0; f < 30; f++) begin
      logic [63:0] w [5];
      w[0] = make_header($urandom, 4'(f), 1'b1);
      for (int i = 1; i < 5; i++) w[i] = {$urandom, $urandom};
      send(w);
      wait (labels.size() == 1);
      @(posedge clk);
      check(got.size() == 10, $sformatf("frame %0d: %0d words", f, got.size()));
      for (int i = 0; i < 10 && i < got.size(); i++)
        check(got[i] == w[i/2][(i%2)*32 +: 32], $sformatf("frame %0d word %0d", f, i));
      check(labels[0] == w[0][31:0], "label");
      got.delete(); labels.delete();
    end
    check(nref > 0, "frames were refused for lack of room");
    $display("refused %0d", nref);
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
