// channel_interface: channel interface module of the packets receiving side.
//
// Receive path: request frames arrive through chan_link_rx. A write frame
// (header with bit 0 = 0, then four 64-bit data words) is unpacked into the
// write data FIFO (four words) and then its header into the write command
// FIFO, so a command is visible only once its data are stored. A read frame
// (header only, bit 0 = 1) goes into the read command FIFO. A frame is refused
// at its SOF word (DST_DSC_N) if the FIFOs it needs lack room.
//
// Send path: when the read data label FIFO is not empty, a burst of read data
// is complete. The module pops the label, the burst's header from the read
// command keep FIFO and four words from the read data FIFO, and sends them as
// a five-word read-data frame through chan_link_tx.
//
// The split of request frames by the read/write bit and the packing of read
// data with the kept read header follow the design description; the push
// order and the room checks are this design's choice.
module channel_interface
  import mas_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 2048,
  parameter int unsigned TIMEOUT    = 64,
  parameter int unsigned CH_DELAY   = 0,
  localparam int unsigned FW = $clog2(FIFO_DEPTH) + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // channel, request direction (in) and return direction (out)
  input  ch_fwd_t       rx_fwd,
  output ch_bwd_t       rx_bwd,
  output ch_fwd_t       tx_fwd,
  input  ch_bwd_t       tx_bwd,
  // write data, write command and read command FIFOs (write sides)
  output logic          wdat_wen,
  output logic [63:0]   wdat_wdata,
  input  logic [FW-1:0] wdat_free,
  output logic          wcmd_wen,
  output logic [63:0]   wcmd_wdata,
  input  logic          wcmd_full,
  output logic          rcmd_wen,
  output logic [63:0]   rcmd_wdata,
  input  logic          rcmd_full,
  // read command keep, read data and read data label FIFOs (read sides)
  input  logic          keep_empty,
  output logic          keep_ren,
  input  logic [63:0]   keep_rdata,
  input  logic          rdat_empty,
  output logic          rdat_ren,
  input  logic [63:0]   rdat_rdata,
  input  logic          rlab_empty,
  output logic          rlab_ren,
  // events
  output logic          ev_wr_frame,
  output logic          ev_rd_frame,
  output logic          ev_refuse,
  output logic          ev_drop,
  output logic          ev_rdat_frame,
  output logic          ev_refused,
  output logic          ev_cancel
);

  // ---------------- receive path ----------------
  logic             rx_valid, rx_ack;
  logic [4:0][63:0] rx_words;
  logic [2:0]       rk;   // data words pushed for the current write frame

  chan_link_rx #(.FRAME_MAX(5), .LEN_RD(RD_FRAME_LEN), .LEN_WR(WR_FRAME_LEN), .CH_DELAY(CH_DELAY)) u_rx (
    .clk, .rst_n, .rx_fwd, .rx_bwd,
    .room_rd   (!rcmd_full),
    .room_wr   (wdat_free >= FW'(BEATS64) && !wcmd_full),
    .frm_valid (rx_valid), .frm_words (rx_words), .frm_ack (rx_ack),
    .ev_refuse, .ev_drop
  );

  logic rx_is_rd;
  assign rx_is_rd = hdr_is_read(rx_words[0]);

  always_comb begin
    wdat_wen   = 1'b0;
    wdat_wdata = '0;
    wcmd_wen   = 1'b0;
    rcmd_wen   = 1'b0;
    rx_ack     = 1'b0;
    if (rx_valid) begin
      if (rx_is_rd) begin
        rcmd_wen = 1'b1;
        rx_ack   = 1'b1;
      end else if (rk < 3'(BEATS64)) begin
        wdat_wen   = 1'b1;
        wdat_wdata = rx_words[rk + 3'd1];
      end else begin
        wcmd_wen = 1'b1;
        rx_ack   = 1'b1;
      end
    end
  end
  assign wcmd_wdata  = rx_words[0];
  assign rcmd_wdata  = rx_words[0];
  assign ev_wr_frame = wcmd_wen;
  assign ev_rd_frame = rcmd_wen;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    rk <= '0;
    else if (rx_ack)               rk <= '0;
    else if (wdat_wen)             rk <= rk + 3'd1;
  end

  // ---------------- send path ----------------
  typedef enum logic [1:0] {T_IDLE, T_HDR, T_DATA, T_SEND} tstate_e;
  tstate_e          tstate;
  logic [2:0]       tk;
  logic [4:0][63:0] tx_words;
  logic             tx_done;

  assign rlab_ren = (tstate == T_IDLE) && !rlab_empty;
  assign keep_ren = (tstate == T_HDR) && !keep_empty;
  assign rdat_ren = (tstate == T_DATA) && !rdat_empty;
  assign ev_rdat_frame = tx_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tstate   <= T_IDLE;
      tk       <= '0;
      tx_words <= '0;
    end else begin
      unique case (tstate)
        T_IDLE: if (!rlab_empty) tstate <= T_HDR;
        T_HDR:  if (!keep_empty) begin
                  tx_words[0] <= keep_rdata;
                  tk          <= 3'd1;
                  tstate      <= T_DATA;
                end
        T_DATA: if (!rdat_empty) begin
                  tx_words[tk] <= rdat_rdata;
                  tk           <= tk + 3'd1;
                  if (tk == 3'(BEATS64)) tstate <= T_SEND;
                end
        T_SEND: if (tx_done) tstate <= T_IDLE;
        default: tstate <= T_IDLE;
      endcase
    end
  end

  chan_link_tx #(.FRAME_MAX(5), .TIMEOUT(TIMEOUT), .CH_DELAY(CH_DELAY)) u_tx (
    .clk, .rst_n,
    .frm_valid (tstate == T_SEND),
    .frm_len   (3'(RDAT_FRAME_LEN)),
    .frm_words (tx_words),
    .frm_done  (tx_done),
    .tx_fwd, .tx_bwd,
    .ev_refused, .ev_cancel
  );

endmodule
