// packets_sending_side: the processor-side FPGA of the memory accessing
// system.
//
// The stimulus (standing in for the processor) issues 32-byte AXI bursts.
// axi_write_receive and axi_read_receive buffer them, as 32-bit words, in the
// write data/command FIFO and the read command FIFO, and count complete
// bursts in the write and read label FIFOs. channel_send packs them into
// 64-bit frames on the outgoing channel. channel_receive unpacks returning
// read-data frames into the read data FIFO and its label FIFO, from which
// axi_read_back answers the stimulus.
//
// Two clock domains: aclk for the stimulus and AXI modules, ch_clk for the
// channel. All six FIFOs are asynchronous, 32 bits wide and FIFO_DEPTH deep,
// and are the only crossings between the domains. The block split and FIFO
// sizes follow the design description; the clocking of each module is this
// design's choice.
module packets_sending_side
  import mas_pkg::*;
#(
  parameter stim_mode_e  MODE       = MODE_COPY,
  parameter int unsigned FIFO_DEPTH = 4096,
  parameter int unsigned AREA_BYTES = 32'h0000_4000,
  parameter int unsigned NUM_OPS    = 0,
  parameter int unsigned MAX_OUTSTANDING = 16,
  parameter int unsigned TIMEOUT    = 64,
  parameter int unsigned CH_DELAY   = 0
) (
  input  logic        aclk,
  input  logic        ch_clk,
  input  logic        rst_n,
  input  logic        init_calib_complete,
  // channel: requests out, read data in
  output ch_fwd_t     tx_fwd,
  input  ch_bwd_t     tx_bwd,
  input  ch_fwd_t     rx_fwd,
  output ch_bwd_t     rx_bwd,
  // status
  output logic        fill_done,
  output logic        test_stop,
  output logic [15:0] rd_mismatch
);

  localparam int unsigned FW = $clog2(FIFO_DEPTH) + 1;

  logic arst_n, crst_n;
  rst_sync u_rs_a (.clk(aclk),   .rst_n_in(rst_n), .rst_n_out(arst_n));
  rst_sync u_rs_c (.clk(ch_clk), .rst_n_in(rst_n), .rst_n_out(crst_n));

  // ---- stimulus <-> AXI modules ----
  logic        awvalid, awready, wvalid, wready, wlast, bvalid, bready;
  logic [3:0]  awid, wid, bid, wstrb;
  logic [31:0] awaddr, wdata;
  logic [7:0]  awlen, arlen;
  logic [2:0]  awsize, arsize;
  logic [1:0]  awburst, arburst, bresp, rresp;
  logic        arvalid, arready, rvalid, rready, rlast;
  logic [3:0]  arid, rid;
  logic [31:0] araddr, rdata, rd_addr;

  axi_stimulus #(.MODE(MODE), .AREA_BYTES(AREA_BYTES), .NUM_OPS(NUM_OPS), .MAX_OUTSTANDING(MAX_OUTSTANDING)) u_stimulus (
    .aclk, .aresetn(arst_n), .init_calib_complete,
    .axi_wvalid(awvalid), .axi_wready(awready), .axi_wid(awid), .axi_waddr(awaddr),
    .axi_wlen(awlen), .axi_wsize(awsize), .axi_wburst(awburst),
    .axi_wd_valid(wvalid), .axi_wd_ready(wready), .axi_wd_wid(wid), .axi_wd_data(wdata),
    .axi_wd_strb(wstrb), .axi_wd_last(wlast),
    .axi_wd_bid(bid), .axi_wd_bresp(bresp), .axi_wd_bvalid(bvalid), .axi_wd_bready(bready),
    .axi_rvalid(arvalid), .axi_rready(arready), .axi_rid(arid), .axi_raddr(araddr),
    .axi_rlen(arlen), .axi_rsize(arsize), .axi_rburst(arburst),
    .axi_rd_valid(rvalid), .axi_rd_rready(rready), .axi_rd_rid(rid), .axi_rd_data(rdata),
    .axi_rd_resp(rresp), .axi_rd_last(rlast), .axi_rd_addr(rd_addr),
    .fill_done, .test_stop, .rd_mismatch
  );

  // ---- FIFO wires ----
  logic          wf_wen, wf_ren, wf_empty, wf_full;  logic [31:0] wf_wdata, wf_rdata; logic [FW-1:0] wf_free, wf_cnt;
  logic          wl_wen, wl_ren, wl_empty, wl_full;  logic [31:0] wl_wdata, wl_rdata; logic [FW-1:0] wl_free, wl_cnt;
  logic          rf_wen, rf_ren, rf_empty, rf_full;  logic [31:0] rf_wdata, rf_rdata; logic [FW-1:0] rf_free, rf_cnt;
  logic          rl_wen, rl_ren, rl_empty, rl_full;  logic [31:0] rl_wdata, rl_rdata; logic [FW-1:0] rl_free, rl_cnt;
  logic          df_wen, df_ren, df_empty, df_full;  logic [31:0] df_wdata, df_rdata; logic [FW-1:0] df_free, df_cnt;
  logic          dl_wen, dl_ren, dl_empty, dl_full;  logic [31:0] dl_wdata, dl_rdata; logic [FW-1:0] dl_free, dl_cnt;

  axi_write_receive #(.FIFO_DEPTH(FIFO_DEPTH)) u_wr_recv (
    .aclk, .aresetn(arst_n),
    .axi_wvalid(awvalid), .axi_wready(awready), .axi_wid(awid), .axi_waddr(awaddr),
    .axi_wlen(awlen), .axi_wsize(awsize), .axi_wburst(awburst),
    .axi_wd_valid(wvalid), .axi_wd_ready(wready), .axi_wd_wid(wid), .axi_wd_data(wdata),
    .axi_wd_strb(wstrb), .axi_wd_last(wlast),
    .axi_wd_bid(bid), .axi_wd_bresp(bresp), .axi_wd_bvalid(bvalid), .axi_wd_bready(bready),
    .fifo_wen(wf_wen), .fifo_wdata(wf_wdata), .fifo_free(wf_free),
    .label_wen(wl_wen), .label_wdata(wl_wdata), .label_full(wl_full)
  );

  axi_read_receive #(.FIFO_DEPTH(FIFO_DEPTH)) u_rd_recv (
    .aclk, .aresetn(arst_n),
    .axi_rvalid(arvalid), .axi_rready(arready), .axi_rid(arid), .axi_raddr(araddr),
    .axi_rlen(arlen), .axi_rsize(arsize), .axi_rburst(arburst),
    .fifo_wen(rf_wen), .fifo_wdata(rf_wdata), .fifo_free(rf_free),
    .label_wen(rl_wen), .label_wdata(rl_wdata), .label_full(rl_full)
  );

  axi_read_back u_rd_back (
    .aclk, .aresetn(arst_n),
    .label_empty(dl_empty), .label_ren(dl_ren),
    .fifo_empty(df_empty), .fifo_ren(df_ren), .fifo_rdata(df_rdata),
    .axi_rd_valid(rvalid), .axi_rd_rready(rready), .axi_rd_rid(rid), .axi_rd_data(rdata),
    .axi_rd_resp(rresp), .axi_rd_last(rlast), .axi_rd_addr(rd_addr)
  );

  // aclk -> ch_clk
  async_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_wr_data_fifo (
    .wclk(aclk), .wrst_n(arst_n), .wen(wf_wen), .wdata(wf_wdata), .full(wf_full), .wfree(wf_free),
    .rclk(ch_clk), .rrst_n(crst_n), .ren(wf_ren), .rdata(wf_rdata), .empty(wf_empty), .rcount(wf_cnt));
  async_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_wr_label_fifo (
    .wclk(aclk), .wrst_n(arst_n), .wen(wl_wen), .wdata(wl_wdata), .full(wl_full), .wfree(wl_free),
    .rclk(ch_clk), .rrst_n(crst_n), .ren(wl_ren), .rdata(wl_rdata), .empty(wl_empty), .rcount(wl_cnt));
  async_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_rd_cmd_fifo (
    .wclk(aclk), .wrst_n(arst_n), .wen(rf_wen), .wdata(rf_wdata), .full(rf_full), .wfree(rf_free),
    .rclk(ch_clk), .rrst_n(crst_n), .ren(rf_ren), .rdata(rf_rdata), .empty(rf_empty), .rcount(rf_cnt));
  async_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_rd_label_fifo (
    .wclk(aclk), .wrst_n(arst_n), .wen(rl_wen), .wdata(rl_wdata), .full(rl_full), .wfree(rl_free),
    .rclk(ch_clk), .rrst_n(crst_n), .ren(rl_ren), .rdata(rl_rdata), .empty(rl_empty), .rcount(rl_cnt));
  // ch_clk -> aclk
  async_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_rd_data_fifo (
    .wclk(ch_clk), .wrst_n(crst_n), .wen(df_wen), .wdata(df_wdata), .full(df_full), .wfree(df_free),
    .rclk(aclk), .rrst_n(arst_n), .ren(df_ren), .rdata(df_rdata), .empty(df_empty), .rcount(df_cnt));
  async_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_rd_data_label_fifo (
    .wclk(ch_clk), .wrst_n(crst_n), .wen(dl_wen), .wdata(dl_wdata), .full(dl_full), .wfree(dl_free),
    .rclk(aclk), .rrst_n(arst_n), .ren(dl_ren), .rdata(dl_rdata), .empty(dl_empty), .rcount(dl_cnt));

  logic ev_wr_frame, ev_rd_frame, ev_refused, ev_cancel, ev_rdat_frame, ev_refuse, ev_drop;

  channel_send #(.TIMEOUT(TIMEOUT), .CH_DELAY(CH_DELAY)) u_ch_send (
    .clk(ch_clk), .rst_n(crst_n),
    .wlabel_empty(wl_empty), .wlabel_ren(wl_ren),
    .wfifo_empty(wf_empty), .wfifo_ren(wf_ren), .wfifo_rdata(wf_rdata),
    .rlabel_empty(rl_empty), .rlabel_ren(rl_ren),
    .rfifo_empty(rf_empty), .rfifo_ren(rf_ren), .rfifo_rdata(rf_rdata),
    .tx_fwd, .tx_bwd,
    .ev_wr_frame, .ev_rd_frame, .ev_refused, .ev_cancel
  );

  channel_receive #(.FIFO_DEPTH(FIFO_DEPTH), .CH_DELAY(CH_DELAY)) u_ch_recv (
    .clk(ch_clk), .rst_n(crst_n), .rx_fwd, .rx_bwd,
    .fifo_wen(df_wen), .fifo_wdata(df_wdata), .fifo_free(df_free),
    .label_wen(dl_wen), .label_wdata(dl_wdata), .label_full(dl_full),
    .ev_frame(ev_rdat_frame), .ev_refuse, .ev_drop
  );

endmodule
