// channel_delay_chain: register stages inserted into one direction of the
// parallel channel, used to study how channel latency affects the system.
//
// Every signal of the channel passes through CH_DELAY flip-flops clocked by
// ch_clk: the source-driven group (DATA, SOF_N, EOF_N, SRC_RDY_N, SRC_DSC_N)
// from src_fwd to dst_fwd, and the destination-driven group (DST_RDY_N,
// DST_DSC_N) from dst_bwd back to src_bwd. Each register adds one clock
// cycle of delay, so a round trip takes 2*CH_DELAY cycles more than a direct
// connection. The stages reset to the idle channel (all control signals
// high). With CH_DELAY = 0 the two ends are connected directly. The default
// of 4 is the smallest delay of the description's sweep; mem_access_top sets
// its own CH_DELAY, 0 unless overridden.
// A chain of plain registers per signal follows the design description; the
// link ends (chan_link_tx / chan_link_rx) are given the same CH_DELAY so that
// they allow for the round trip.
module channel_delay_chain
  import mas_pkg::*;
#(
  parameter int unsigned CH_DELAY = 4
) (
  input  logic    clk,
  input  logic    rst_n,
  input  ch_fwd_t src_fwd,
  output ch_bwd_t src_bwd,
  output ch_fwd_t dst_fwd,
  input  ch_bwd_t dst_bwd
);

  if (CH_DELAY == 0) begin : g_direct
    assign dst_fwd = src_fwd;
    assign src_bwd = dst_bwd;
  end else begin : g_regs
    ch_fwd_t fwd_q [CH_DELAY];
    ch_bwd_t bwd_q [CH_DELAY];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < int'(CH_DELAY); i++) begin
          fwd_q[i] <= CH_FWD_IDLE;
          bwd_q[i] <= '{dst_rdy_n: 1'b1, dst_dsc_n: 1'b1};
        end
      end else begin
        fwd_q[0] <= src_fwd;
        bwd_q[0] <= dst_bwd;
        for (int i = 1; i < int'(CH_DELAY); i++) begin
          fwd_q[i] <= fwd_q[i-1];
          bwd_q[i] <= bwd_q[i-1];
        end
      end
    end
    assign dst_fwd = fwd_q[CH_DELAY-1];
    assign src_bwd = bwd_q[CH_DELAY-1];
  end

endmodule
