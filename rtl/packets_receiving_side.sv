// packets_receiving_side: the memory-side FPGA of the memory accessing
// system.
//
// channel_interface unpacks request frames from the channel into three
// asynchronous FIFOs (write data, write command, read command).
// mig_interface takes the commands round-robin and drives the AXI4 port of
// the DDR3 controller (AXI_MIG, outside this block). Read headers wait in the
// read command keep FIFO while their data are fetched into the read data
// FIFO; a label in the read data label FIFO then tells channel_interface to
// send the burst back as a read-data frame.
//
// Two clock domains: ch_clk for the channel and ui_clk, the DDR3
// controller's user clock, for the AXI4 side. All six FIFOs are 64 bits wide
// and FIFO_DEPTH deep, following the design description.
module packets_receiving_side
  import mas_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 2048,
  parameter int unsigned TIMEOUT    = 64,
  parameter int unsigned CH_DELAY   = 0
) (
  input  logic        ch_clk,
  input  logic        ui_clk,
  input  logic        rst_n,
  // channel: requests in, read data out
  input  ch_fwd_t     rx_fwd,
  output ch_bwd_t     rx_bwd,
  output ch_fwd_t     tx_fwd,
  input  ch_bwd_t     tx_bwd,
  // AXI4 master towards the DDR3 controller
  output logic [3:0]  m_awid,
  output logic [31:0] m_awaddr,
  output logic [7:0]  m_awlen,
  output logic [2:0]  m_awsize,
  output logic [1:0]  m_awburst,
  output logic        m_awvalid,
  input  logic        m_awready,
  output logic [63:0] m_wdata,
  output logic [7:0]  m_wstrb,
  output logic        m_wlast,
  output logic        m_wvalid,
  input  logic        m_wready,
  input  logic [3:0]  m_bid,
  input  logic [1:0]  m_bresp,
  input  logic        m_bvalid,
  output logic        m_bready,
  output logic [3:0]  m_arid,
  output logic [31:0] m_araddr,
  output logic [7:0]  m_arlen,
  output logic [2:0]  m_arsize,
  output logic [1:0]  m_arburst,
  output logic        m_arvalid,
  input  logic        m_arready,
  input  logic [3:0]  m_rid,
  input  logic [63:0] m_rdata,
  input  logic [1:0]  m_rresp,
  input  logic        m_rlast,
  input  logic        m_rvalid,
  output logic        m_rready,
  output logic [15:0] resp_err
);

  localparam int unsigned FW = $clog2(FIFO_DEPTH) + 1;

  logic crst_n, urst_n;
  rst_sync u_rs_c (.clk(ch_clk), .rst_n_in(rst_n), .rst_n_out(crst_n));
  rst_sync u_rs_u (.clk(ui_clk), .rst_n_in(rst_n), .rst_n_out(urst_n));

  logic wd_wen, wd_ren, wd_empty, wd_full;  logic [63:0] wd_wdata, wd_rdata; logic [FW-1:0] wd_free, wd_cnt;
  logic wc_wen, wc_ren, wc_empty, wc_full;  logic [63:0] wc_wdata, wc_rdata; logic [FW-1:0] wc_free, wc_cnt;
  logic rc_wen, rc_ren, rc_empty, rc_full;  logic [63:0] rc_wdata, rc_rdata; logic [FW-1:0] rc_free, rc_cnt;
  logic kp_wen, kp_ren, kp_empty, kp_full;  logic [63:0] kp_wdata, kp_rdata; logic [FW-1:0] kp_free, kp_cnt;
  logic rd_wen, rd_ren, rd_empty, rd_full;  logic [63:0] rd_wdata, rd_rdata; logic [FW-1:0] rd_free, rd_cnt;
  logic rl_wen, rl_ren, rl_empty, rl_full;  logic [63:0] rl_wdata, rl_rdata; logic [FW-1:0] rl_free, rl_cnt;

  logic ev_wr_frame, ev_rd_frame, ev_refuse, ev_drop, ev_rdat_frame, ev_refused, ev_cancel;
  logic ev_wr_done, ev_rd_done;

  channel_interface #(.FIFO_DEPTH(FIFO_DEPTH), .TIMEOUT(TIMEOUT), .CH_DELAY(CH_DELAY)) u_ch_if (
    .clk(ch_clk), .rst_n(crst_n),
    .rx_fwd, .rx_bwd, .tx_fwd, .tx_bwd,
    .wdat_wen(wd_wen), .wdat_wdata(wd_wdata), .wdat_free(wd_free),
    .wcmd_wen(wc_wen), .wcmd_wdata(wc_wdata), .wcmd_full(wc_full),
    .rcmd_wen(rc_wen), .rcmd_wdata(rc_wdata), .rcmd_full(rc_full),
    .keep_empty(kp_empty), .keep_ren(kp_ren), .keep_rdata(kp_rdata),
    .rdat_empty(rd_empty), .rdat_ren(rd_ren), .rdat_rdata(rd_rdata),
    .rlab_empty(rl_empty), .rlab_ren(rl_ren),
    .ev_wr_frame, .ev_rd_frame, .ev_refuse, .ev_drop, .ev_rdat_frame, .ev_refused, .ev_cancel
  );

  // ch_clk -> ui_clk
  async_fifo #(.WIDTH(64), .DEPTH(FIFO_DEPTH)) u_wr_data_fifo (
    .wclk(ch_clk), .wrst_n(crst_n), .wen(wd_wen), .wdata(wd_wdata), .full(wd_full), .wfree(wd_free),
    .rclk(ui_clk), .rrst_n(urst_n), .ren(wd_ren), .rdata(wd_rdata), .empty(wd_empty), .rcount(wd_cnt));
  async_fifo #(.WIDTH(64), .DEPTH(FIFO_DEPTH)) u_wr_cmd_fifo (
    .wclk(ch_clk), .wrst_n(crst_n), .wen(wc_wen), .wdata(wc_wdata), .full(wc_full), .wfree(wc_free),
    .rclk(ui_clk), .rrst_n(urst_n), .ren(wc_ren), .rdata(wc_rdata), .empty(wc_empty), .rcount(wc_cnt));
  async_fifo #(.WIDTH(64), .DEPTH(FIFO_DEPTH)) u_rd_cmd_fifo (
    .wclk(ch_clk), .wrst_n(crst_n), .wen(rc_wen), .wdata(rc_wdata), .full(rc_full), .wfree(rc_free),
    .rclk(ui_clk), .rrst_n(urst_n), .ren(rc_ren), .rdata(rc_rdata), .empty(rc_empty), .rcount(rc_cnt));
  // ui_clk -> ch_clk
  async_fifo #(.WIDTH(64), .DEPTH(FIFO_DEPTH)) u_rd_keep_fifo (
    .wclk(ui_clk), .wrst_n(urst_n), .wen(kp_wen), .wdata(kp_wdata), .full(kp_full), .wfree(kp_free),
    .rclk(ch_clk), .rrst_n(crst_n), .ren(kp_ren), .rdata(kp_rdata), .empty(kp_empty), .rcount(kp_cnt));
  async_fifo #(.WIDTH(64), .DEPTH(FIFO_DEPTH)) u_rd_data_fifo (
    .wclk(ui_clk), .wrst_n(urst_n), .wen(rd_wen), .wdata(rd_wdata), .full(rd_full), .wfree(rd_free),
    .rclk(ch_clk), .rrst_n(crst_n), .ren(rd_ren), .rdata(rd_rdata), .empty(rd_empty), .rcount(rd_cnt));
  async_fifo #(.WIDTH(64), .DEPTH(FIFO_DEPTH)) u_rd_label_fifo (
    .wclk(ui_clk), .wrst_n(urst_n), .wen(rl_wen), .wdata(rl_wdata), .full(rl_full), .wfree(rl_free),
    .rclk(ch_clk), .rrst_n(crst_n), .ren(rl_ren), .rdata(rl_rdata), .empty(rl_empty), .rcount(rl_cnt));

  mig_interface #(.FIFO_DEPTH(FIFO_DEPTH)) u_mig_if (
    .clk(ui_clk), .rst_n(urst_n),
    .wcmd_empty(wc_empty), .wcmd_ren(wc_ren), .wcmd_rdata(wc_rdata),
    .wdat_empty(wd_empty), .wdat_ren(wd_ren), .wdat_rdata(wd_rdata),
    .rcmd_empty(rc_empty), .rcmd_ren(rc_ren), .rcmd_rdata(rc_rdata),
    .keep_wen(kp_wen), .keep_wdata(kp_wdata), .keep_full(kp_full),
    .rdat_wen(rd_wen), .rdat_wdata(rd_wdata), .rdat_free(rd_free),
    .rlab_wen(rl_wen), .rlab_wdata(rl_wdata), .rlab_full(rl_full),
    .m_awid, .m_awaddr, .m_awlen, .m_awsize, .m_awburst, .m_awvalid, .m_awready,
    .m_wdata, .m_wstrb, .m_wlast, .m_wvalid, .m_wready,
    .m_bid, .m_bresp, .m_bvalid, .m_bready,
    .m_arid, .m_araddr, .m_arlen, .m_arsize, .m_arburst, .m_arvalid, .m_arready,
    .m_rid, .m_rdata, .m_rresp, .m_rlast, .m_rvalid, .m_rready,
    .resp_err, .ev_wr_done, .ev_rd_done
  );

endmodule
