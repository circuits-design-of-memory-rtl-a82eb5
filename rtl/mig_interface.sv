// mig_interface: AXI4 master of the packets receiving side, facing the DDR3
// controller (AXI_MIG).
//
// Write and read commands wait in two FIFOs as 64-bit packet headers
// {address, reserved, ID, rw}; write data waits in the write data FIFO as four
// 64-bit words per burst. The module serves the two command FIFOs round-robin
// and runs one transaction at a time:
//  * write: AW (address and ID from the header, AWLEN=3, AWSIZE=3 (8 bytes),
//    INCR), four W beats popped from the write data FIFO with WSTRB all ones
//    and WLAST on the fourth, then wait for B;
//  * read: only when the read data FIFO has room for four words and the keep
//    and label FIFOs for one entry. AR as above; at the AR handshake the
//    header goes into the read command keep FIFO; the four R beats go into the
//    read data FIFO; after RLAST the header is pushed into the read data label
//    FIFO, telling the channel interface module that the burst is complete.
// Round-robin service and the keep/label FIFOs follow the design description;
// the 64-bit AXI data width, the one-transaction-at-a-time policy and the
// room checks are this design's choice. bresp/rresp other than OKAY are
// counted on resp_err.
module mig_interface
  import mas_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 2048,
  localparam int unsigned FW = $clog2(FIFO_DEPTH) + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // command and data FIFOs from the channel interface (read sides)
  input  logic          wcmd_empty,
  output logic          wcmd_ren,
  input  logic [63:0]   wcmd_rdata,
  input  logic          wdat_empty,
  output logic          wdat_ren,
  input  logic [63:0]   wdat_rdata,
  input  logic          rcmd_empty,
  output logic          rcmd_ren,
  input  logic [63:0]   rcmd_rdata,
  // keep, read data and label FIFOs towards the channel interface (write sides)
  output logic          keep_wen,
  output logic [63:0]   keep_wdata,
  input  logic          keep_full,
  output logic          rdat_wen,
  output logic [63:0]   rdat_wdata,
  input  logic [FW-1:0] rdat_free,
  output logic          rlab_wen,
  output logic [63:0]   rlab_wdata,
  input  logic          rlab_full,
  // AXI4 master towards AXI_MIG
  output logic [3:0]    m_awid,
  output logic [31:0]   m_awaddr,
  output logic [7:0]    m_awlen,
  output logic [2:0]    m_awsize,
  output logic [1:0]    m_awburst,
  output logic          m_awvalid,
  input  logic          m_awready,
  output logic [63:0]   m_wdata,
  output logic [7:0]    m_wstrb,
  output logic          m_wlast,
  output logic          m_wvalid,
  input  logic          m_wready,
  input  logic [3:0]    m_bid,
  input  logic [1:0]    m_bresp,
  input  logic          m_bvalid,
  output logic          m_bready,
  output logic [3:0]    m_arid,
  output logic [31:0]   m_araddr,
  output logic [7:0]    m_arlen,
  output logic [2:0]    m_arsize,
  output logic [1:0]    m_arburst,
  output logic          m_arvalid,
  input  logic          m_arready,
  input  logic [3:0]    m_rid,
  input  logic [63:0]   m_rdata,
  input  logic [1:0]    m_rresp,
  input  logic          m_rlast,
  input  logic          m_rvalid,
  output logic          m_rready,
  // status
  output logic [15:0]   resp_err,
  output logic          ev_wr_done,
  output logic          ev_rd_done
);

  typedef enum logic [2:0] {S_IDLE, S_AW, S_W, S_B, S_AR, S_R, S_LABEL} state_e;
  state_e      state;
  logic        last_rd;
  logic [1:0]  beat;
  logic [63:0] hdr_q;

  logic can_wr, can_rd;
  assign can_wr = !wcmd_empty;
  assign can_rd = !rcmd_empty && (rdat_free >= FW'(BEATS64)) && !keep_full && !rlab_full;

  assign m_awid    = hdr_id(wcmd_rdata);
  assign m_awaddr  = hdr_addr(wcmd_rdata);
  assign m_awlen   = 8'(BEATS64 - 1);
  assign m_awsize  = 3'd3;
  assign m_awburst = AXI_BURST_INCR;
  assign m_awvalid = (state == S_AW);
  assign wcmd_ren  = m_awvalid && m_awready;

  assign m_wdata   = wdat_rdata;
  assign m_wstrb   = 8'hFF;
  assign m_wlast   = (beat == 2'd3);
  assign m_wvalid  = (state == S_W) && !wdat_empty;
  assign wdat_ren  = m_wvalid && m_wready;
  assign m_bready  = (state == S_B);

  assign m_arid    = hdr_id(rcmd_rdata);
  assign m_araddr  = hdr_addr(rcmd_rdata);
  assign m_arlen   = 8'(BEATS64 - 1);
  assign m_arsize  = 3'd3;
  assign m_arburst = AXI_BURST_INCR;
  assign m_arvalid = (state == S_AR);
  assign rcmd_ren  = m_arvalid && m_arready;
  assign keep_wen  = rcmd_ren;
  assign keep_wdata = rcmd_rdata;

  assign m_rready   = (state == S_R);
  assign rdat_wen   = m_rvalid && m_rready;
  assign rdat_wdata = m_rdata;
  assign rlab_wen   = (state == S_LABEL);
  assign rlab_wdata = hdr_q;

  assign ev_wr_done = m_bvalid && m_bready;
  assign ev_rd_done = rlab_wen;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      last_rd  <= 1'b0;
      beat     <= '0;
      hdr_q    <= '0;
      resp_err <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (can_wr && (!can_rd || last_rd)) begin
            state   <= S_AW;
            last_rd <= 1'b0;
          end else if (can_rd) begin
            state   <= S_AR;
            last_rd <= 1'b1;
          end
        end
        S_AW: if (m_awready) begin
                beat  <= '0;
                state <= S_W;
              end
        S_W:  if (m_wvalid && m_wready) begin
                beat <= beat + 2'd1;
                if (m_wlast) state <= S_B;
              end
        S_B:  if (m_bvalid) begin
                if (m_bresp != AXI_RESP_OKAY) resp_err <= resp_err + 16'd1;
                state <= S_IDLE;
              end
        S_AR: if (m_arready) begin
                hdr_q <= rcmd_rdata;
                state <= S_R;
              end
        S_R:  if (m_rvalid) begin
                if (m_rresp != AXI_RESP_OKAY) resp_err <= resp_err + 16'd1;
                if (m_rlast) state <= S_LABEL;
              end
        S_LABEL: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  a_aw_stable: assert property (@(posedge clk) disable iff (!rst_n)
    m_awvalid && !m_awready |=> m_awvalid && $stable(m_awaddr));
  a_ar_stable: assert property (@(posedge clk) disable iff (!rst_n)
    m_arvalid && !m_arready |=> m_arvalid && $stable(m_araddr));
  a_w_stable: assert property (@(posedge clk) disable iff (!rst_n)
    m_wvalid && !m_wready |=> m_wvalid && $stable(m_wdata));

endmodule
