// channel_receive: channel receiving module of the packets sending side.
//
// It takes read-data frames (header plus four 64-bit words) from the return
// direction of the channel through chan_link_rx, splits every 64-bit word
// into two 32-bit words, low half first, and writes the ten words (command
// word, address, eight data words) into the read data FIFO. After the tenth
// word it pushes the command word into the read data label FIFO, which tells
// the AXI read back module that a whole 32-byte burst is waiting.
//
// A frame is refused at its SOF word (DST_DSC_N) unless the read data FIFO has
// room for ten words and the label FIFO for one label; write-marked frames are
// not legal in this direction and are dropped as malformed. Copying a frame
// takes eleven cycles, during which the channel is held with DST_RDY_N high.
// The split into 32-bit words and the label update follow the design
// description; the room check and the word order are this design's choice.
module channel_receive
  import mas_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 4096,
  parameter int unsigned CH_DELAY   = 0,
  localparam int unsigned FW = $clog2(FIFO_DEPTH) + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  ch_fwd_t       rx_fwd,
  output ch_bwd_t       rx_bwd,
  // read data FIFO and read data label FIFO (write sides)
  output logic          fifo_wen,
  output logic [31:0]   fifo_wdata,
  input  logic [FW-1:0] fifo_free,
  output logic          label_wen,
  output logic [31:0]   label_wdata,
  input  logic          label_full,
  output logic          ev_frame,
  output logic          ev_refuse,
  output logic          ev_drop
);

  logic             frm_valid, frm_ack;
  logic [4:0][63:0] words;
  logic [3:0]       k;

  chan_link_rx #(.FRAME_MAX(5), .LEN_RD(RDAT_FRAME_LEN), .LEN_WR(0), .CH_DELAY(CH_DELAY)) u_rx (
    .clk, .rst_n, .rx_fwd, .rx_bwd,
    .room_rd  (fifo_free >= FW'(2 + BEATS32) && !label_full),
    .room_wr  (1'b1),
    .frm_valid, .frm_words (words), .frm_ack,
    .ev_refuse, .ev_drop
  );

  assign fifo_wen    = frm_valid && (k < 4'd10);
  assign fifo_wdata  = words[k[3:1]][k[0]*32 +: 32];
  assign label_wen   = frm_valid && (k == 4'd10);
  assign label_wdata = words[0][31:0];
  assign frm_ack     = label_wen;
  assign ev_frame    = label_wen;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        k <= '0;
    else if (frm_ack)  k <= '0;
    else if (frm_valid) k <= k + 4'd1;
  end

endmodule
