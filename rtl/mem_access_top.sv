// mem_access_top: DDR3 memory accessing system over a parallel inter-FPGA
// channel.
//
// A processor-side FPGA (packets_sending_side, whose stimulus stands in for
// the processor) turns 32-byte AXI bursts into packets and sends them over a
// point-to-point, full-duplex 64-bit channel to a memory-side FPGA
// (packets_receiving_side), which replays them as AXI4 transactions on the
// DDR3 controller and sends read data back the same way. Each direction of
// the channel carries DATA[63:0], SOF_N, EOF_N, SRC_RDY_N and SRC_DSC_N from
// its source and DST_RDY_N, DST_DSC_N from its destination; both directions
// share the channel clock ch_clk and the global reset rst_n.
//
// The DDR3 controller (a vendor IP with an AXI4 slave port) is not part of
// this RTL: its AXI4 port is brought out as m_*, clocked by ui_clk, and its
// calibration-done flag comes in as init_calib_complete. The stimulus kernel
// is chosen by MODE. FIFO depths default to 4096 x 32 bits on the processor
// side and 2048 x 64 bits on the memory side, as described for the design.
// Read data can only drain if the return path can hold every outstanding
// read: floor(SEND_FIFO_DEPTH/10) + RECV_FIFO_DEPTH/4 >= MAX_OUTSTANDING
// (409 + 512 >= 16 at the defaults); smaller FIFOs need fewer outstanding
// reads, or a refused read command can block the write-backs behind it.
// CH_DELAY inserts that many register stages into each channel direction
// (channel_delay_chain), as in the description's latency experiments; the
// link ends then wait 2*CH_DELAY+1 cycles for a possible refusal per frame.
module mem_access_top
  import mas_pkg::*;
#(
  parameter stim_mode_e  MODE            = MODE_COPY,
  parameter int unsigned SEND_FIFO_DEPTH = 4096,
  parameter int unsigned RECV_FIFO_DEPTH = 2048,
  parameter int unsigned AREA_BYTES      = 32'h0000_4000,
  parameter int unsigned NUM_OPS         = 0,
  parameter int unsigned MAX_OUTSTANDING = 16,
  parameter int unsigned TIMEOUT         = 64,
  parameter int unsigned CH_DELAY        = 0
) (
  input  logic        aclk,
  input  logic        ch_clk,
  input  logic        ui_clk,
  input  logic        rst_n,
  input  logic        init_calib_complete,
  // AXI4 master towards the DDR3 controller (ui_clk domain)
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
  // status
  output logic        fill_done,
  output logic        test_stop,
  output logic [15:0] rd_mismatch,
  output logic [15:0] resp_err
);

  // Parallel channel: request direction (sending -> receiving) and return
  // direction (receiving -> sending).
  // Each direction passes through CH_DELAY register stages (none by default)
  // between the source end (*_s) and the destination end (*_d).
  ch_fwd_t req_fwd_s, req_fwd_d, ret_fwd_s, ret_fwd_d;
  ch_bwd_t req_bwd_s, req_bwd_d, ret_bwd_s, ret_bwd_d;
  logic    crst_n;

  rst_sync u_rs_c (.clk(ch_clk), .rst_n_in(rst_n), .rst_n_out(crst_n));

  channel_delay_chain #(.CH_DELAY(CH_DELAY)) u_req_delay (
    .clk(ch_clk), .rst_n(crst_n),
    .src_fwd(req_fwd_s), .src_bwd(req_bwd_s), .dst_fwd(req_fwd_d), .dst_bwd(req_bwd_d)
  );
  channel_delay_chain #(.CH_DELAY(CH_DELAY)) u_ret_delay (
    .clk(ch_clk), .rst_n(crst_n),
    .src_fwd(ret_fwd_s), .src_bwd(ret_bwd_s), .dst_fwd(ret_fwd_d), .dst_bwd(ret_bwd_d)
  );

  packets_sending_side #(
    .MODE(MODE), .FIFO_DEPTH(SEND_FIFO_DEPTH), .AREA_BYTES(AREA_BYTES),
    .NUM_OPS(NUM_OPS), .MAX_OUTSTANDING(MAX_OUTSTANDING), .TIMEOUT(TIMEOUT),
    .CH_DELAY(CH_DELAY)
  ) u_send (
    .aclk, .ch_clk, .rst_n, .init_calib_complete,
    .tx_fwd(req_fwd_s), .tx_bwd(req_bwd_s), .rx_fwd(ret_fwd_d), .rx_bwd(ret_bwd_d),
    .fill_done, .test_stop, .rd_mismatch
  );

  packets_receiving_side #(
    .FIFO_DEPTH(RECV_FIFO_DEPTH), .TIMEOUT(TIMEOUT), .CH_DELAY(CH_DELAY)
  ) u_recv (
    .ch_clk, .ui_clk, .rst_n,
    .rx_fwd(req_fwd_d), .rx_bwd(req_bwd_d), .tx_fwd(ret_fwd_s), .tx_bwd(ret_bwd_s),
    .m_awid, .m_awaddr, .m_awlen, .m_awsize, .m_awburst, .m_awvalid, .m_awready,
    .m_wdata, .m_wstrb, .m_wlast, .m_wvalid, .m_wready,
    .m_bid, .m_bresp, .m_bvalid, .m_bready,
    .m_arid, .m_araddr, .m_arlen, .m_arsize, .m_arburst, .m_arvalid, .m_arready,
    .m_rid, .m_rdata, .m_rresp, .m_rlast, .m_rvalid, .m_rready,
    .resp_err
  );

endmodule
