// chan_link_rx: destination end of one direction of the parallel inter-FPGA
// channel.
//
// Words arrive on each edge where SRC_RDY_N and DST_RDY_N are both low. A
// frame begins with SOF_N low on its header word; bit 0 of the header tells a
// read frame (1) from a write frame (0). At the SOF word the receiver asks the
// caller whether the downstream buffers can take a frame of that kind
// (room_rd / room_wr). If not, it pulses DST_DSC_N in the next cycle and
// discards the frame, and the source will send it again. Otherwise the frame
// is gathered into a FRAME_MAX-word staging buffer; at EOF_N its length is
// compared with LEN_RD or LEN_WR and a frame of the wrong length is dropped.
// A SRC_DSC_N pulse from the source drops a partly received frame.
//
// A complete frame is offered on frm_valid with DST_RDY_N held high (no new
// words) until the caller, having copied it into its FIFOs, pulses frm_ack.
// With CH_DELAY > 0 (register stages in the channel) a raised DST_RDY_N would
// reach the source too late to stop words in flight, so DST_RDY_N stays low
// and a frame whose SOF arrives while the staging buffer is full is refused
// with DST_DSC_N in the next cycle instead.
// The signal set follows the channel's signal table; the staging buffer, the
// refusal one cycle after SOF and the length check are this design's choice.
module chan_link_rx
  import mas_pkg::*;
#(
  parameter int unsigned FRAME_MAX = 5,
  parameter int unsigned LEN_RD    = 1,
  parameter int unsigned LEN_WR    = 5,
  parameter int unsigned CH_DELAY  = 0
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  ch_fwd_t                    rx_fwd,
  output ch_bwd_t                    rx_bwd,
  input  logic                       room_rd,
  input  logic                       room_wr,
  output logic                       frm_valid,
  output logic [FRAME_MAX-1:0][63:0] frm_words,
  input  logic                       frm_ack,
  output logic                       ev_refuse,
  output logic                       ev_drop
);

  typedef enum logic [1:0] {S_IDLE, S_RECV, S_REFUSE, S_FULL} state_e;
  state_e     state;
  logic [2:0] cnt;

  logic xfer, sof, eof, is_rd;
  logic [2:0] exp_len;
  assign xfer    = !rx_fwd.src_rdy_n && !rx_bwd.dst_rdy_n;
  assign sof     = !rx_fwd.sof_n;
  assign eof     = !rx_fwd.eof_n;
  assign is_rd   = hdr_is_read(rx_fwd.data);

  logic hdr_rd;   // kind of the frame being received
  assign exp_len = hdr_rd ? 3'(LEN_RD) : 3'(LEN_WR);

  // Without channel delay a full staging buffer holds DST_RDY_N high. With
  // delay stages the source would see that too late, so DST_RDY_N stays low
  // and a frame that starts while the buffer is full is refused instead.
  logic refuse_full;
  assign rx_bwd.dst_rdy_n = (state == S_FULL) && (CH_DELAY == 0);
  assign rx_bwd.dst_dsc_n = !((state == S_REFUSE) || refuse_full);
  assign frm_valid        = (state == S_FULL);
  assign ev_refuse        = (state == S_REFUSE) || refuse_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cnt       <= '0;
      hdr_rd    <= 1'b0;
      frm_words <= '0;
      ev_drop   <= 1'b0;
      refuse_full <= 1'b0;
    end else begin
      ev_drop <= 1'b0;
      refuse_full <= (CH_DELAY != 0) && (state == S_FULL) && xfer && sof;
      unique case (state)
        S_IDLE: if (xfer && sof) begin
          if (!(is_rd ? room_rd : room_wr)) begin
            state <= S_REFUSE;
          end else begin
            frm_words[0] <= rx_fwd.data;
            hdr_rd       <= is_rd;
            cnt          <= 3'd1;
            if (eof) begin
              if ((is_rd ? 3'(LEN_RD) : 3'(LEN_WR)) == 3'd1) state <= S_FULL;
              else ev_drop <= 1'b1;
            end else begin
              state <= S_RECV;
            end
          end
        end
        S_RECV: begin
          if (!rx_fwd.src_dsc_n) begin
            state   <= S_IDLE;
            ev_drop <= 1'b1;
          end else if (xfer) begin
            if (sof || cnt == 3'(FRAME_MAX)) begin
              state   <= S_IDLE;
              ev_drop <= 1'b1;
            end else begin
              frm_words[cnt] <= rx_fwd.data;
              cnt            <= cnt + 3'd1;
              if (eof) begin
                if (cnt + 3'd1 == exp_len) state <= S_FULL;
                else begin
                  state   <= S_IDLE;
                  ev_drop <= 1'b1;
                end
              end
            end
          end
        end
        S_REFUSE: state <= S_IDLE;
        S_FULL:   if (frm_ack) state <= S_IDLE;
        default:  state <= S_IDLE;
      endcase
    end
  end

  a_ack_only_full: assert property (@(posedge clk) disable iff (!rst_n) frm_ack |-> state == S_FULL);

endmodule
