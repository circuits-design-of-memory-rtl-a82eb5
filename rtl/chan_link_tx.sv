// chan_link_tx: source end of one direction of the parallel inter-FPGA
// channel.
//
// The caller presents a frame of FRAME_MAX 64-bit words (frm_words[0] is the
// header) with its length frm_len (1 for a read command, 5 otherwise) and
// holds frm_valid until frm_done pulses. The source drives SRC_RDY_N low with
// one word per cycle, SOF_N low on the first word and EOF_N low on the last;
// a word moves on each clock edge where SRC_RDY_N and DST_RDY_N are both low.
//
// Discontinue handling (all signals active low):
//  * DST_DSC_N: the destination refuses the frame, one cycle after its SOF
//    word, when it lacks buffer room. The source then restarts the frame from
//    its first word. To see a refusal of a one-word frame, the source keeps
//    every frame for one cycle after its EOF word (state HOLD).
//  * SRC_DSC_N: if the destination stalls inside a frame for TIMEOUT cycles
//    the source cancels the frame with a one-cycle SRC_DSC_N pulse (SRC_RDY_N
//    high) and then sends it again from the start.
// With CH_DELAY register stages in the channel (channel_delay_chain), a
// refusal arrives 2*CH_DELAY+1 cycles after the SOF word, and HOLD lasts until
// that window has passed; with CH_DELAY = 0 this is the single HOLD cycle.
// The channel signals follow the channel's signal table; the transfer rule,
// the refusal timing, the resend policy and the timeout are this design's
// choices. ev_refused / ev_cancel pulse once per refusal / cancellation.
module chan_link_tx
  import mas_pkg::*;
#(
  parameter int unsigned FRAME_MAX = 5,
  parameter int unsigned TIMEOUT   = 64,
  parameter int unsigned CH_DELAY  = 0
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      frm_valid,
  input  logic [2:0]                frm_len,
  input  logic [FRAME_MAX-1:0][63:0] frm_words,
  output logic                      frm_done,
  output ch_fwd_t                   tx_fwd,
  input  ch_bwd_t                   tx_bwd,
  output logic                      ev_refused,
  output logic                      ev_cancel
);

  typedef enum logic [1:0] {S_IDLE, S_SEND, S_HOLD, S_CANCEL} state_e;
  state_e     state;
  logic [2:0] idx;
  logic [$clog2(TIMEOUT+1)-1:0] stall;
  // Cycles since the SOF word moved. A refusal comes back 2*CH_DELAY+1
  // cycles after the SOF word, so a frame is done only after that window.
  localparam int unsigned WIN = 2 * CH_DELAY + 1;
  localparam int unsigned AW  = $clog2(WIN + FRAME_MAX + 2);
  logic [AW-1:0] age;
  logic          win_over;
  assign win_over = age >= AW'(WIN);

  logic xfer, refused;
  assign xfer    = (state == S_SEND) && !tx_bwd.dst_rdy_n;
  assign refused = ((state == S_SEND) || (state == S_HOLD)) && !tx_bwd.dst_dsc_n;

  always_comb begin
    tx_fwd = CH_FWD_IDLE;
    if (state == S_SEND) begin
      tx_fwd.data      = frm_words[idx];
      tx_fwd.src_rdy_n = 1'b0;
      tx_fwd.sof_n     = !(idx == 3'd0);
      tx_fwd.eof_n     = !(idx == frm_len - 3'd1);
    end else if (state == S_CANCEL) begin
      tx_fwd.src_dsc_n = 1'b0;
    end
  end

  assign frm_done   = (state == S_HOLD) && tx_bwd.dst_dsc_n && win_over;
  assign ev_refused = refused;
  assign ev_cancel  = (state == S_CANCEL);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      idx   <= '0;
      stall <= '0;
      age   <= '0;
    end else begin
      if (state == S_SEND && xfer && idx == 3'd0) age <= AW'(1);
      else if (!win_over)                         age <= age + 1'b1;
      unique case (state)
        S_IDLE: if (frm_valid) begin
                  state <= S_SEND;
                  idx   <= '0;
                  stall <= '0;
                end
        S_SEND: begin
          if (refused) begin
            idx   <= '0;
            stall <= '0;
          end else if (xfer) begin
            stall <= '0;
            if (idx == frm_len - 3'd1) state <= S_HOLD;
            else                       idx   <= idx + 3'd1;
          end else if (idx != 3'd0) begin
            if (stall == ($bits(stall))'(TIMEOUT - 1)) state <= S_CANCEL;
            else                                       stall <= stall + 1'b1;
          end
        end
        S_HOLD: begin
          if (refused) begin
            state <= S_SEND;
            idx   <= '0;
          end else if (win_over) begin
            state <= S_IDLE;
          end
        end
        S_CANCEL: begin
          state <= S_SEND;
          idx   <= '0;
          stall <= '0;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_len_legal: assert property (@(posedge clk) disable iff (!rst_n)
    state == S_SEND |-> frm_len >= 3'd1 && frm_len <= 3'(FRAME_MAX));
  a_frame_held: assert property (@(posedge clk) disable iff (!rst_n)
    state != S_IDLE |-> frm_valid);

endmodule
