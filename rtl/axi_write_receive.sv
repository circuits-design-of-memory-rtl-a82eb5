// axi_write_receive: AXI write slave of the packets sending side.
//
// For each write burst it accepts the address (AW), pushes the command word
// {27'b0, AWID, 1'b0}, the 32-bit address and the eight 32-bit data beats
// into the write data/command FIFO, answers BRESP = OKAY on the response
// channel, and once that response has been taken pushes one label into the
// write label FIFO. A label therefore means that a whole 10-word burst is
// ready in the data/command FIFO for the channel sending module.
//
// Timing: AW is accepted only when the data/command FIFO has room for the
// whole burst (so a burst is never split); one data beat per cycle; the
// response follows the last beat by one cycle. One burst is handled at a time.
// The command-word format and the order "buffer, respond, then label" follow
// the design description; the room check and the label content (the command
// word again) are this design's choice. Port names follow the stimulus side.
module axi_write_receive
  import mas_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 4096,
  localparam int unsigned FW = $clog2(FIFO_DEPTH) + 1
) (
  input  logic          aclk,
  input  logic          aresetn,
  // write address channel
  input  logic          axi_wvalid,
  output logic          axi_wready,
  input  logic [3:0]    axi_wid,
  input  logic [31:0]   axi_waddr,
  input  logic [7:0]    axi_wlen,
  input  logic [2:0]    axi_wsize,
  input  logic [1:0]    axi_wburst,
  // write data channel
  input  logic          axi_wd_valid,
  output logic          axi_wd_ready,
  input  logic [3:0]    axi_wd_wid,
  input  logic [31:0]   axi_wd_data,
  input  logic [3:0]    axi_wd_strb,
  input  logic          axi_wd_last,
  // write response channel
  output logic [3:0]    axi_wd_bid,
  output logic [1:0]    axi_wd_bresp,
  output logic          axi_wd_bvalid,
  input  logic          axi_wd_bready,
  // write data/command FIFO (write side)
  output logic          fifo_wen,
  output logic [31:0]   fifo_wdata,
  input  logic [FW-1:0] fifo_free,
  // write label FIFO (write side)
  output logic          label_wen,
  output logic [31:0]   label_wdata,
  input  logic          label_full
);

  typedef enum logic [2:0] {S_IDLE, S_ADDR, S_DATA, S_RESP, S_LABEL} state_e;
  state_e      state;
  logic [3:0]  id_q;
  logic [31:0] addr_q;

  // Room for command word + address + 8 data words.
  logic room;
  assign room = fifo_free >= FW'(2 + BEATS32);

  assign axi_wready    = (state == S_IDLE) && room && !label_full;
  assign axi_wd_ready  = (state == S_DATA);
  assign axi_wd_bvalid = (state == S_RESP);
  assign axi_wd_bid    = id_q;
  assign axi_wd_bresp  = AXI_RESP_OKAY;

  always_comb begin
    fifo_wen   = 1'b0;
    fifo_wdata = '0;
    unique case (state)
      S_ADDR:  begin fifo_wen = 1'b1; fifo_wdata = addr_q; end
      S_DATA:  begin fifo_wen = axi_wd_valid; fifo_wdata = axi_wd_data; end
      default: ;
    endcase
    if (state == S_IDLE && axi_wvalid && axi_wready) begin
      fifo_wen   = 1'b1;
      fifo_wdata = cmd_word(axi_wid, 1'b0);
    end
  end

  assign label_wen   = (state == S_LABEL);
  assign label_wdata = cmd_word(id_q, 1'b0);

  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      state  <= S_IDLE;
      id_q   <= '0;
      addr_q <= '0;
    end else begin
      unique case (state)
        S_IDLE:  if (axi_wvalid && axi_wready) begin
                   id_q   <= axi_wid;
                   addr_q <= axi_waddr;
                   state  <= S_ADDR;
                 end
        S_ADDR:  state <= S_DATA;
        S_DATA:  if (axi_wd_valid && axi_wd_last) state <= S_RESP;
        S_RESP:  if (axi_wd_bready) state <= S_LABEL;
        S_LABEL: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // Every burst of this system is 8 beats of 4 bytes, incrementing.
  a_fixed_burst: assert property (@(posedge aclk) disable iff (!aresetn)
    axi_wvalid && axi_wready |-> axi_wlen == AXI_LEN_32B && axi_wsize == AXI_SIZE_4B && axi_wburst == AXI_BURST_INCR);
  a_full_strobe: assert property (@(posedge aclk) disable iff (!aresetn)
    axi_wd_valid && axi_wd_ready |-> axi_wd_strb == 4'hF && axi_wd_wid == id_q);
  a_bvalid_hold: assert property (@(posedge aclk) disable iff (!aresetn)
    axi_wd_bvalid && !axi_wd_bready |=> axi_wd_bvalid);

endmodule
