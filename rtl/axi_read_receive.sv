// axi_read_receive: AXI read-address slave of the packets sending side.
//
// For each read burst it accepts the address (AR), pushes the command word
// {27'b0, ARID, 1'b1} and the 32-bit address into the read command FIFO, and
// then pushes one label into the read label FIFO, telling the channel sending
// module that a complete read command is waiting.
//
// Timing: AR is accepted when the command FIFO has room for two words and the
// label FIFO is not full; the command word is written in the handshake cycle,
// the address in the next one and the label in the one after, so one read
// command is taken every three cycles. The command-word format follows the
// design description; the label content (the command word again) and the
// three-cycle cadence are this design's choice.
module axi_read_receive
  import mas_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 4096,
  localparam int unsigned FW = $clog2(FIFO_DEPTH) + 1
) (
  input  logic          aclk,
  input  logic          aresetn,
  input  logic          axi_rvalid,
  output logic          axi_rready,
  input  logic [3:0]    axi_rid,
  input  logic [31:0]   axi_raddr,
  input  logic [7:0]    axi_rlen,
  input  logic [2:0]    axi_rsize,
  input  logic [1:0]    axi_rburst,
  output logic          fifo_wen,
  output logic [31:0]   fifo_wdata,
  input  logic [FW-1:0] fifo_free,
  output logic          label_wen,
  output logic [31:0]   label_wdata,
  input  logic          label_full
);

  typedef enum logic [1:0] {S_IDLE, S_ADDR, S_LABEL} state_e;
  state_e      state;
  logic [3:0]  id_q;
  logic [31:0] addr_q;

  assign axi_rready = (state == S_IDLE) && (fifo_free >= FW'(2)) && !label_full;

  always_comb begin
    fifo_wen   = 1'b0;
    fifo_wdata = '0;
    if (state == S_IDLE && axi_rvalid && axi_rready) begin
      fifo_wen   = 1'b1;
      fifo_wdata = cmd_word(axi_rid, 1'b1);
    end else if (state == S_ADDR) begin
      fifo_wen   = 1'b1;
      fifo_wdata = addr_q;
    end
  end

  assign label_wen   = (state == S_LABEL);
  assign label_wdata = cmd_word(id_q, 1'b1);

  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      state  <= S_IDLE;
      id_q   <= '0;
      addr_q <= '0;
    end else begin
      unique case (state)
        S_IDLE:  if (axi_rvalid && axi_rready) begin
                   id_q   <= axi_rid;
                   addr_q <= axi_raddr;
                   state  <= S_ADDR;
                 end
        S_ADDR:  state <= S_LABEL;
        S_LABEL: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  a_fixed_burst: assert property (@(posedge aclk) disable iff (!aresetn)
    axi_rvalid && axi_rready |-> axi_rlen == AXI_LEN_32B && axi_rsize == AXI_SIZE_4B && axi_rburst == AXI_BURST_INCR);

endmodule
