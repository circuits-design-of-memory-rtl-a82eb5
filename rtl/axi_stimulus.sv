// axi_stimulus: AXI master that imitates the processor and generates the
// memory traffic of the memory accessing system.
//
// After init_calib_complete (DDR3 initialisation done) it first fills the
// test area: one 32-byte write burst per 32 bytes from address 0 up to and
// including AREA_BYTES, each 32-bit word holding its own word address
// (byte address / 4). When the burst at AREA_BYTES has been acknowledged,
// fill_done rises and one STREAM-like kernel, chosen by MODE, runs over the
// area 0 .. AREA_BYTES-32:
//   COPY   c[i] = a[i]                 a = each burst of the area
//   SCALE  c[i] = SCALAR * a[i]
//   ADD    c[i] = a[i] + b[i]          a = lower half, b = upper half
//   TRIAD  c[i] = a[i] + SCALAR * b[i]
//   GUPS   c[i] = m * a[i]             a at a random burst, m random per op
// Results are written to DST_BASE + (offset of a). GUPS draws its burst index
// and its multiplier (low 8 bits) from two 16-bit LFSRs (taps 16,14,13,11),
// stepped once per read and once per write-back.
//
// Reads are issued back to back with IDs counting modulo 16, at most
// MAX_OUTSTANDING in flight; read data are taken in order, every beat is
// compared with the fill pattern (rd_mismatch counts differences), and each
// result burst is written with AW, eight W beats and a B handshake, one burst
// at a time. test_stop rises when NUM_OPS results (0 = one pass over the
// area) have been acknowledged.
// Burst shape (AWLEN=7, AWSIZE=2, INCR), the five kernels, the fill area and
// the destination base follow the design description and its waveforms; the
// operand placement for ADD/TRIAD, SCALAR, the LFSRs, the GUPS destination
// and the outstanding-read limit are this design's choices.
module axi_stimulus
  import mas_pkg::*;
#(
  parameter stim_mode_e  MODE            = MODE_COPY,
  parameter int unsigned AREA_BYTES      = 32'h0000_4000,
  parameter logic [31:0] DST_BASE        = 32'h1000_0000,
  parameter int unsigned SCALAR          = 3,
  parameter int unsigned MAX_OUTSTANDING = 16,
  parameter int unsigned NUM_OPS         = 0,
  parameter logic [15:0] SEED_ADDR       = 16'hACE1,
  parameter logic [15:0] SEED_MULT       = 16'h1D0F
) (
  input  logic        aclk,
  input  logic        aresetn,
  input  logic        init_calib_complete,
  // write address channel
  output logic        axi_wvalid,
  input  logic        axi_wready,
  output logic [3:0]  axi_wid,
  output logic [31:0] axi_waddr,
  output logic [7:0]  axi_wlen,
  output logic [2:0]  axi_wsize,
  output logic [1:0]  axi_wburst,
  // write data channel
  output logic        axi_wd_valid,
  input  logic        axi_wd_ready,
  output logic [3:0]  axi_wd_wid,
  output logic [31:0] axi_wd_data,
  output logic [3:0]  axi_wd_strb,
  output logic        axi_wd_last,
  // write response channel
  input  logic [3:0]  axi_wd_bid,
  input  logic [1:0]  axi_wd_bresp,
  input  logic        axi_wd_bvalid,
  output logic        axi_wd_bready,
  // read address channel
  output logic        axi_rvalid,
  input  logic        axi_rready,
  output logic [3:0]  axi_rid,
  output logic [31:0] axi_raddr,
  output logic [7:0]  axi_rlen,
  output logic [2:0]  axi_rsize,
  output logic [1:0]  axi_rburst,
  // read data channel
  input  logic        axi_rd_valid,
  output logic        axi_rd_rready,
  input  logic [3:0]  axi_rd_rid,
  input  logic [31:0] axi_rd_data,
  input  logic [1:0]  axi_rd_resp,
  input  logic        axi_rd_last,
  input  logic [31:0] axi_rd_addr,
  // status
  output logic        fill_done,
  output logic        test_stop,
  output logic [15:0] rd_mismatch
);

  localparam int unsigned AREA_BURSTS = AREA_BYTES / BURST_BYTES;
  localparam bit          TWO_OPS     = (MODE == MODE_ADD) || (MODE == MODE_TRIAD);
  localparam int unsigned OPS         = (NUM_OPS != 0) ? NUM_OPS
                                        : (TWO_OPS ? AREA_BURSTS / 2 : AREA_BURSTS);
  localparam int unsigned READS       = TWO_OPS ? 2 * OPS : OPS;
  localparam int unsigned HALF_BYTES  = AREA_BYTES / 2;

  typedef enum logic [1:0] {P_INIT, P_FILL, P_RUN, P_DONE} phase_e;
  typedef enum logic [1:0] {W_IDLE, W_AW, W_DATA, W_B} wstate_e;
  typedef enum logic [1:0] {C_RECV, C_CALC, C_WRITE} cstate_e;

  phase_e  phase;
  wstate_e wst;
  cstate_e cst;

  // ---------------- write engine ----------------
  logic [31:0]      w_addr;
  logic [3:0]       w_id;
  logic [7:0][31:0] w_data;
  logic [2:0]       w_beat;
  logic             w_start, w_done;

  assign axi_wvalid    = (wst == W_AW);
  assign axi_wid       = w_id;
  assign axi_waddr     = w_addr;
  assign axi_wlen      = AXI_LEN_32B;
  assign axi_wsize     = AXI_SIZE_4B;
  assign axi_wburst    = AXI_BURST_INCR;
  assign axi_wd_valid  = (wst == W_DATA);
  assign axi_wd_wid    = w_id;
  assign axi_wd_data   = axi_wd_valid ? w_data[w_beat] : '0;
  assign axi_wd_strb   = axi_wd_valid ? 4'hF : 4'h0;
  assign axi_wd_last   = axi_wd_valid && (w_beat == 3'd7);
  assign axi_wd_bready = (wst == W_B);
  assign w_done        = (wst == W_B) && axi_wd_bvalid;

  // ---------------- fill ----------------
  logic [31:0] fill_addr;
  logic [3:0]  fill_id;

  // ---------------- reads ----------------
  logic [31:0] rd_issued, rd_received, ops_done;
  logic [15:0] lfsr_a, lfsr_m;
  logic [31:0] rd_addr_next;
  logic [31:0] outstanding;

  assign outstanding = rd_issued - rd_received;

  always_comb begin
    unique case (MODE)
      MODE_ADD, MODE_TRIAD:
        rd_addr_next = (rd_issued[0] ? 32'(HALF_BYTES) : 32'd0)
                     + ((rd_issued >> 1) * BURST_BYTES);
      MODE_GUPS:
        rd_addr_next = (32'(lfsr_a) % AREA_BURSTS) * BURST_BYTES;
      default:
        rd_addr_next = rd_issued * BURST_BYTES;
    endcase
  end

  assign axi_rvalid = (phase == P_RUN) && (rd_issued < READS) && (outstanding < MAX_OUTSTANDING);
  assign axi_rid    = rd_issued[3:0];
  assign axi_raddr  = rd_addr_next;
  assign axi_rlen   = AXI_LEN_32B;
  assign axi_rsize  = AXI_SIZE_4B;
  assign axi_rburst = AXI_BURST_INCR;

  // ---------------- collector ----------------
  logic [7:0][31:0] op_a, op_b;
  logic [31:0]      a_addr;
  logic             n_op;        // operand being received (0 = a, 1 = b)
  logic [2:0]       r_beat;
  logic [7:0][31:0] result;

  assign axi_rd_rready = (phase == P_RUN) && (cst == C_RECV);

  always_comb begin
    for (int i = 0; i < 8; i++) begin
      unique case (MODE)
        MODE_ADD:   result[i] = op_a[i] + op_b[i];
        MODE_SCALE: result[i] = 32'(SCALAR) * op_a[i];
        MODE_TRIAD: result[i] = op_a[i] + 32'(SCALAR) * op_b[i];
        MODE_GUPS:  result[i] = {24'b0, lfsr_m[7:0]} * op_a[i];
        default:    result[i] = op_a[i];
      endcase
    end
  end

  assign w_start = ((phase == P_FILL) || (phase == P_RUN && cst == C_CALC)) && (wst == W_IDLE);

  assign fill_done = (phase == P_RUN) || (phase == P_DONE);
  assign test_stop = (phase == P_DONE);

  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      phase       <= P_INIT;
      wst         <= W_IDLE;
      cst         <= C_RECV;
      w_addr      <= '0;
      w_id        <= '0;
      w_data      <= '0;
      w_beat      <= '0;
      fill_addr   <= '0;
      fill_id     <= '0;
      rd_issued   <= '0;
      rd_received <= '0;
      ops_done    <= '0;
      lfsr_a      <= SEED_ADDR;
      lfsr_m      <= SEED_MULT;
      op_a        <= '0;
      op_b        <= '0;
      a_addr      <= '0;
      n_op        <= 1'b0;
      r_beat      <= '0;
      rd_mismatch <= '0;
    end else begin
      // ---- write engine ----
      unique case (wst)
        W_IDLE: if (w_start) begin
          wst    <= W_AW;
          w_beat <= '0;
          if (phase == P_FILL) begin
            w_addr <= fill_addr;
            w_id   <= fill_id;
            for (int i = 0; i < 8; i++) w_data[i] <= (fill_addr >> 2) + 32'(i);
          end else begin
            w_addr <= DST_BASE + a_addr;
            w_id   <= ops_done[3:0];
            w_data <= result;
          end
        end
        W_AW:   if (axi_wready) wst <= W_DATA;
        W_DATA: if (axi_wd_ready) begin
                  w_beat <= w_beat + 3'd1;
                  if (w_beat == 3'd7) wst <= W_B;
                end
        W_B:    if (axi_wd_bvalid) wst <= W_IDLE;
        default: wst <= W_IDLE;
      endcase

      // ---- phases ----
      unique case (phase)
        P_INIT: if (init_calib_complete) phase <= P_FILL;
        P_FILL: if (w_done) begin
          if (fill_addr == 32'(AREA_BYTES)) phase <= P_RUN;
          else begin
            fill_addr <= fill_addr + BURST_BYTES;
            fill_id   <= fill_id + 4'd1;
          end
        end
        default: ;
      endcase

      // ---- read issue ----
      if (axi_rvalid && axi_rready) begin
        rd_issued <= rd_issued + 32'd1;
        if (MODE == MODE_GUPS) lfsr_a <= lfsr16_next(lfsr_a);
      end

      // ---- collector ----
      if (phase == P_RUN) begin
        unique case (cst)
          C_RECV: if (axi_rd_valid) begin
            if (axi_rd_data != (axi_rd_addr >> 2) + 32'(r_beat))
              rd_mismatch <= rd_mismatch + 16'd1;
            if (n_op) op_b[r_beat] <= axi_rd_data;
            else      op_a[r_beat] <= axi_rd_data;
            if (!n_op && r_beat == 3'd0) a_addr <= axi_rd_addr;
            r_beat <= r_beat + 3'd1;
            if (axi_rd_last) begin
              r_beat      <= '0;
              rd_received <= rd_received + 32'd1;
              if (TWO_OPS && !n_op) n_op <= 1'b1;
              else begin
                n_op <= 1'b0;
                cst  <= C_CALC;
              end
            end
          end
          C_CALC:  if (wst == W_IDLE) cst <= C_WRITE;
          C_WRITE: if (w_done) begin
            ops_done <= ops_done + 32'd1;
            if (MODE == MODE_GUPS) lfsr_m <= lfsr16_next(lfsr_m);
            cst <= C_RECV;
            if (ops_done + 32'd1 == OPS) phase <= P_DONE;
          end
          default: cst <= C_RECV;
        endcase
      end
    end
  end

  a_wvalid_hold: assert property (@(posedge aclk) disable iff (!aresetn)
    axi_wvalid && !axi_wready |=> axi_wvalid && $stable(axi_waddr));
  a_rvalid_hold: assert property (@(posedge aclk) disable iff (!aresetn)
    axi_rvalid && !axi_rready |=> axi_rvalid && $stable(axi_raddr));
  a_resp_okay: assert property (@(posedge aclk) disable iff (!aresetn)
    axi_wd_bvalid && axi_wd_bready |-> axi_wd_bresp == AXI_RESP_OKAY);

endmodule
