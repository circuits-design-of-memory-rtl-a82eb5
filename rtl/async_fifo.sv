// async_fifo: dual-clock FIFO used for every buffer of the memory accessing
// system (data, command, label and keep FIFOs on both FPGAs).
//
// Write and read pointers are one bit wider than the address and cross the
// clock boundary in Gray code through two-flop synchronisers, so either side
// may run at any frequency. The read side is first-word fall-through: rdata is
// the head entry whenever empty is low, and ren pops it. full/wfree are
// computed from the synchronised read pointer and rcount from the synchronised
// write pointer, so both are conservative (they lag the far side by two or
// three cycles of the near clock).
//
// The widths and depths (32 x 4096 on the sending FPGA, 64 x 2048 on the
// receiving FPGA) follow the design description; the Gray-pointer scheme and
// the wfree/rcount level outputs, used to check room for a whole burst, are
// this design's choice. DEPTH must be a power of two.
module async_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 4096,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             wen,
  input  logic [WIDTH-1:0] wdata,
  output logic             full,
  output logic [AW:0]      wfree,

  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             ren,
  output logic [WIDTH-1:0] rdata,
  output logic             empty,
  output logic [AW:0]      rcount
);

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer in the write domain
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer in the read domain

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write side ----------------
  logic [AW:0] rbin_w;
  assign rbin_w = gray2bin(rgray_w2);
  assign wfree  = (AW+1)'(DEPTH) - (wbin - rbin_w);
  assign full   = (wbin - rbin_w) == (AW+1)'(DEPTH);

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wen && !full) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  always_ff @(posedge wclk) begin
    if (wen && !full) mem[wbin[AW-1:0]] <= wdata;
  end

  // ---------------- read side ----------------
  logic [AW:0] wbin_r;
  assign wbin_r = gray2bin(wgray_r2);
  assign rcount = wbin_r - rbin;
  assign empty  = (wbin_r == rbin);
  assign rdata  = mem[rbin[AW-1:0]];

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (ren && !empty) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end

  // A producer or consumer that ignores full/empty has a bug upstream.
  a_no_overflow:  assert property (@(posedge wclk) disable iff (!wrst_n) !(wen && full));
  a_no_underflow: assert property (@(posedge rclk) disable iff (!rrst_n) !(ren && empty));

endmodule
