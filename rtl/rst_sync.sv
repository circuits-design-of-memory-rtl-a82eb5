// rst_sync: reset synchroniser. The global RST_N is applied asynchronously
// and released synchronously, two flip-flops after it goes high, so every
// clock domain of the system leaves reset on its own clock edge. This helper
// is this design's choice; the description only names the global reset.
module rst_sync (
  input  logic clk,
  input  logic rst_n_in,
  output logic rst_n_out
);
  logic meta;
  always_ff @(posedge clk or negedge rst_n_in) begin
    if (!rst_n_in) begin
      meta      <= 1'b0;
      rst_n_out <= 1'b0;
    end else begin
      meta      <= 1'b1;
      rst_n_out <= meta;
    end
  end
endmodule
