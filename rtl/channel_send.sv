// channel_send: channel sending module of the packets sending side.
//
// It turns the bursts buffered by the AXI receiving modules into channel
// frames. Two label FIFOs say how many complete bursts wait: the write label
// FIFO (each label = command word, address and eight data words in the write
// data/command FIFO) and the read label FIFO (each label = command word and
// address in the read command FIFO). The two are served round-robin: after a
// read the next frame is a write if one waits, and after a write a read.
//
// For the chosen burst the module pops the label, then the 32-bit words one
// per cycle, pairing them into 64-bit words with the first word in bits
// [31:0]. The command word {27'b0, ID, rw} and the address thus form the
// header {address, reserved, ID, rw}; a write frame carries four more words.
// The frame then goes out through chan_link_tx, and the next burst is
// gathered only after the frame has been delivered.
// Round-robin arbitration and the 32-to-64 bit pairing follow the design
// description; the low-half-first order and the gather-then-send sequence are
// this design's choice.
module channel_send
  import mas_pkg::*;
#(
  parameter int unsigned TIMEOUT  = 64,
  parameter int unsigned CH_DELAY = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  // write label FIFO and write data/command FIFO (read sides)
  input  logic        wlabel_empty,
  output logic        wlabel_ren,
  input  logic        wfifo_empty,
  output logic        wfifo_ren,
  input  logic [31:0] wfifo_rdata,
  // read label FIFO and read command FIFO (read sides)
  input  logic        rlabel_empty,
  output logic        rlabel_ren,
  input  logic        rfifo_empty,
  output logic        rfifo_ren,
  input  logic [31:0] rfifo_rdata,
  // channel, sending direction
  output ch_fwd_t     tx_fwd,
  input  ch_bwd_t     tx_bwd,
  // events
  output logic        ev_wr_frame,
  output logic        ev_rd_frame,
  output logic        ev_refused,
  output logic        ev_cancel
);

  typedef enum logic [1:0] {S_IDLE, S_GATHER, S_SEND} state_e;
  state_e          state;
  logic            cur_rd;     // frame being built is a read command
  logic            last_rd;    // previous frame was a read command
  logic [3:0]      k;          // 32-bit words gathered so far
  logic [4:0][63:0] words;
  logic [3:0]      nwords;
  logic            frm_done;

  assign nwords = cur_rd ? 4'd2 : 4'd10;

  // Round-robin pick.
  logic pick_rd, pick_wr;
  always_comb begin
    pick_rd = 1'b0;
    pick_wr = 1'b0;
    if (state == S_IDLE) begin
      if (!rlabel_empty && !wlabel_empty) begin
        pick_rd = !last_rd;
        pick_wr = last_rd;
      end else begin
        pick_rd = !rlabel_empty;
        pick_wr = !wlabel_empty;
      end
    end
  end

  assign rlabel_ren = pick_rd;
  assign wlabel_ren = pick_wr;
  assign wfifo_ren  = (state == S_GATHER) && !cur_rd && !wfifo_empty;
  assign rfifo_ren  = (state == S_GATHER) &&  cur_rd && !rfifo_empty;

  logic [31:0] word_in;
  logic        word_ok;
  assign word_in = cur_rd ? rfifo_rdata : wfifo_rdata;
  assign word_ok = cur_rd ? !rfifo_empty : !wfifo_empty;

  assign ev_wr_frame = frm_done && !cur_rd;
  assign ev_rd_frame = frm_done &&  cur_rd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      cur_rd  <= 1'b0;
      last_rd <= 1'b0;
      k       <= '0;
      words   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (pick_rd || pick_wr) begin
          cur_rd <= pick_rd;
          k      <= '0;
          words  <= '0;
          state  <= S_GATHER;
        end
        S_GATHER: if (word_ok) begin
          words[k[3:1]][k[0]*32 +: 32] <= word_in;
          k <= k + 4'd1;
          if (k == nwords - 4'd1) state <= S_SEND;
        end
        S_SEND: if (frm_done) begin
          last_rd <= cur_rd;
          state   <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  chan_link_tx #(.FRAME_MAX(5), .TIMEOUT(TIMEOUT), .CH_DELAY(CH_DELAY)) u_tx (
    .clk, .rst_n,
    .frm_valid (state == S_SEND),
    .frm_len   (cur_rd ? 3'(RD_FRAME_LEN) : 3'(WR_FRAME_LEN)),
    .frm_words (words),
    .frm_done,
    .tx_fwd, .tx_bwd,
    .ev_refused, .ev_cancel
  );

endmodule
