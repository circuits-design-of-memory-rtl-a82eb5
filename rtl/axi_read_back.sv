// axi_read_back: returns read data to the stimulus on the AXI read data
// channel of the packets sending side.
//
// The channel receiving module stores each returned burst in the read data
// FIFO as ten 32-bit words (command word {27'b0, ID, 1}, address, eight data
// words) and then pushes a label. While the read data label FIFO is not empty
// this module pops the label, the command word and the address, then plays
// the eight data words out as one AXI burst with RID taken from the command
// word, RRESP = OKAY and RLAST on the eighth beat. The burst's address is
// given alongside on axi_rd_addr, as the description lists the read address
// among the returned information.
//
// Timing: two cycles of header pops, then one beat per cycle while
// axi_rd_rready is high. The word order in the FIFO and the extra address
// output are this design's reading of the description.
module axi_read_back
  import mas_pkg::*;
(
  input  logic        aclk,
  input  logic        aresetn,
  // read data label FIFO
  input  logic        label_empty,
  output logic        label_ren,
  // read data FIFO
  input  logic        fifo_empty,
  output logic        fifo_ren,
  input  logic [31:0] fifo_rdata,
  // AXI read data channel towards the stimulus
  output logic        axi_rd_valid,
  input  logic        axi_rd_rready,
  output logic [3:0]  axi_rd_rid,
  output logic [31:0] axi_rd_data,
  output logic [1:0]  axi_rd_resp,
  output logic        axi_rd_last,
  output logic [31:0] axi_rd_addr
);

  typedef enum logic [1:0] {S_IDLE, S_CMD, S_ADDR, S_DATA} state_e;
  state_e      state;
  logic [2:0]  beat;
  logic [3:0]  id_q;
  logic [31:0] addr_q;

  assign label_ren    = (state == S_IDLE) && !label_empty;
  assign axi_rd_valid = (state == S_DATA) && !fifo_empty;
  assign axi_rd_data  = fifo_rdata;
  assign axi_rd_rid   = id_q;
  assign axi_rd_resp  = AXI_RESP_OKAY;
  assign axi_rd_last  = (state == S_DATA) && (beat == 3'd7);
  assign axi_rd_addr  = addr_q;

  always_comb begin
    unique case (state)
      S_CMD, S_ADDR: fifo_ren = !fifo_empty;
      S_DATA:        fifo_ren = axi_rd_valid && axi_rd_rready;
      default:       fifo_ren = 1'b0;
    endcase
  end

  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      state  <= S_IDLE;
      beat   <= '0;
      id_q   <= '0;
      addr_q <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (!label_empty) state <= S_CMD;
        S_CMD:  if (!fifo_empty) begin
                  id_q  <= fifo_rdata[4:1];
                  state <= S_ADDR;
                end
        S_ADDR: if (!fifo_empty) begin
                  addr_q <= fifo_rdata;
                  beat   <= '0;
                  state  <= S_DATA;
                end
        S_DATA: if (axi_rd_valid && axi_rd_rready) begin
                  beat <= beat + 3'd1;
                  if (beat == 3'd7) state <= S_IDLE;
                end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_rvalid_hold: assert property (@(posedge aclk) disable iff (!aresetn)
    axi_rd_valid && !axi_rd_rready |=> axi_rd_valid && $stable(axi_rd_data));

endmodule
