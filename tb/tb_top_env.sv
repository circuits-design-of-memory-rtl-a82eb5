// tb_top_env: one complete memory accessing system (mem_access_top plus a
// behavioural DDR3 controller) run through the fill phase and one kernel,
// then checked against values computed here from the kernel's definition.
//
// After test_stop it reads the memory model back: the fill area must hold
// each word's own word address, and the destination area the kernel result.
// For GUPS the two address/multiplier LFSR sequences are regenerated here.
// It also counts how often each mechanism of the system happened (frames of
// each kind, round-robin switches, refusals with DST_DSC_N in both channel
// directions, AXI back-pressure, controller stalls) and reports them.
module tb_top_env
  import mas_pkg::*;
#(
  parameter stim_mode_e  MODE        = MODE_COPY,
  parameter int unsigned AREA_BYTES  = 32'h1000,
  parameter int unsigned SEND_DEPTH  = 16,
  parameter int unsigned RECV_DEPTH  = 4,
  parameter int unsigned MAX_OUT     = 2,
  parameter int unsigned STALL       = 3,
  parameter int unsigned CH_DELAY    = 0
) (
  input  logic aclk,
  input  logic ch_clk,
  input  logic ui_clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_wr_frames,
  output int   n_rd_frames,
  output int   n_rdat_frames,
  output int   n_rr_switch,
  output int   n_req_refused,
  output int   n_ret_refused,
  output int   n_aw_stall,
  output int   n_mig_stall
);

  localparam logic [31:0] DST_BASE    = 32'h1000_0000;
  localparam int unsigned BURSTS      = AREA_BYTES / 32;
  localparam bit          TWO_OPS     = (MODE == MODE_ADD) || (MODE == MODE_TRIAD);
  localparam int unsigned OPS         = TWO_OPS ? BURSTS / 2 : BURSTS;
  localparam int unsigned READS       = TWO_OPS ? 2 * OPS : OPS;

  logic init_calib_complete, fill_done, test_stop;
  logic [15:0] rd_mismatch, resp_err;

  logic [3:0]  awid, bid, arid, rid;
  logic [31:0] awaddr, araddr;
  logic [7:0]  awlen, arlen, wstrb;
  logic [2:0]  awsize, arsize;
  logic [1:0]  awburst, arburst, bresp, rresp;
  logic        awvalid, awready, wlast, wvalid, wready, bvalid, bready;
  logic        arvalid, arready, rlast, rvalid, rready;
  logic [63:0] wdata, rdata;

  mem_access_top #(
    .MODE(MODE), .SEND_FIFO_DEPTH(SEND_DEPTH), .RECV_FIFO_DEPTH(RECV_DEPTH),
    .AREA_BYTES(AREA_BYTES), .MAX_OUTSTANDING(MAX_OUT), .CH_DELAY(CH_DELAY)
  ) u_dut (
    .aclk, .ch_clk, .ui_clk, .rst_n, .init_calib_complete,
    .m_awid(awid), .m_awaddr(awaddr), .m_awlen(awlen), .m_awsize(awsize), .m_awburst(awburst),
    .m_awvalid(awvalid), .m_awready(awready),
    .m_wdata(wdata), .m_wstrb(wstrb), .m_wlast(wlast), .m_wvalid(wvalid), .m_wready(wready),
    .m_bid(bid), .m_bresp(bresp), .m_bvalid(bvalid), .m_bready(bready),
    .m_arid(arid), .m_araddr(araddr), .m_arlen(arlen), .m_arsize(arsize), .m_arburst(arburst),
    .m_arvalid(arvalid), .m_arready(arready),
    .m_rid(rid), .m_rdata(rdata), .m_rresp(rresp), .m_rlast(rlast), .m_rvalid(rvalid), .m_rready(rready),
    .fill_done, .test_stop, .rd_mismatch, .resp_err
  );

  axi_mig_model #(.STALL(STALL)) u_mig (
    .clk(ui_clk), .rst_n, .init_calib_complete,
    .awid, .awaddr, .awlen, .awsize, .awburst, .awvalid, .awready,
    .wdata, .wstrb, .wlast, .wvalid, .wready, .bid, .bresp, .bvalid, .bready,
    .arid, .araddr, .arlen, .arsize, .arburst, .arvalid, .arready,
    .rid, .rdata, .rresp, .rlast, .rvalid, .rready
  );

  // ---------------- mechanism counters ----------------
  logic last_was_rd;
  logic seen_frame;
  // counted only once reset is released
  always @(posedge ch_clk) if (rst_n) begin
    if (u_dut.u_send.u_ch_send.ev_wr_frame) begin
      n_wr_frames++;
      if (seen_frame && last_was_rd) n_rr_switch++;
      last_was_rd = 1'b0; seen_frame = 1'b1;
    end
    if (u_dut.u_send.u_ch_send.ev_rd_frame) begin
      n_rd_frames++;
      if (seen_frame && !last_was_rd) n_rr_switch++;
      last_was_rd = 1'b1; seen_frame = 1'b1;
    end
    if (u_dut.u_send.u_ch_recv.ev_frame)       n_rdat_frames++;
    if (u_dut.u_send.u_ch_send.ev_refused)     n_req_refused++;
    if (u_dut.u_recv.u_ch_if.ev_refused)       n_ret_refused++;
  end
  always @(posedge aclk)  if (rst_n && u_dut.u_send.awvalid && !u_dut.u_send.awready) n_aw_stall++;
  always @(posedge ui_clk) if (rst_n && ((awvalid && !awready) || (arvalid && !arready) || (wvalid && !wready))) n_mig_stall++;

  // ---------------- checking ----------------
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL [%s, delay %0d] %s", MODE.name(), CH_DELAY, what);
    end
  endtask

  initial begin
    logic [31:0] exp_mem [logic [31:0]];
    logic [15:0] la, lm;
    done = 1'b0; checks = 0; failures = 0;
    n_wr_frames = 0; n_rd_frames = 0; n_rdat_frames = 0; n_rr_switch = 0;
    n_req_refused = 0; n_ret_refused = 0; n_aw_stall = 0; n_mig_stall = 0;
    last_was_rd = 1'b0; seen_frame = 1'b0;

    // Writes are acknowledged once buffered, so test_stop comes before the
    // last write reaches the memory: wait for the controller too.
    wait (test_stop === 1'b1);
    wait (u_mig.n_writes == int'(BURSTS + 1 + OPS));
    // the source counts a frame as sent only after its refusal window
    repeat (2 * CH_DELAY + 4) @(posedge ch_clk);
    repeat (4) @(posedge aclk);

    // Expected destination contents.
    la = 16'hACE1; lm = 16'h1D0F;
    for (int k = 0; k < int'(OPS); k++) begin
      logic [31:0] a_off, b_off, a, b, r;
      unique case (MODE)
        MODE_ADD, MODE_TRIAD: begin a_off = 32'(k) * 32; b_off = AREA_BYTES / 2 + 32'(k) * 32; end
        MODE_GUPS:            begin a_off = (32'(la) % BURSTS) * 32; b_off = 0; end
        default:              begin a_off = 32'(k) * 32; b_off = 0; end
      endcase
      for (int i = 0; i < 8; i++) begin
        a = a_off / 4 + 32'(i);
        b = b_off / 4 + 32'(i);
        unique case (MODE)
          MODE_COPY:  r = a;
          MODE_SCALE: r = 3 * a;
          MODE_ADD:   r = a + b;
          MODE_TRIAD: r = a + 3 * b;
          default:    r = {24'b0, lm[7:0]} * a;
        endcase
        exp_mem[DST_BASE + a_off + 32'(4 * i)] = r;
      end
      la = lfsr16_next(la);
      lm = lfsr16_next(lm);
    end

    // Fill area, including the burst at AREA_BYTES.
    for (int j = 0; j < int'(AREA_BYTES / 4) + 8; j++)
      check(u_mig.peek32(32'(4 * j)) == 32'(j), $sformatf("fill word %0d = %h", j, u_mig.peek32(32'(4 * j))));
    foreach (exp_mem[a])
      check(u_mig.peek32(a) == exp_mem[a], $sformatf("result @%h = %h, want %h", a, u_mig.peek32(a), exp_mem[a]));

    check(rd_mismatch == 0, "read data differed from the fill pattern");
    check(resp_err == 0, "controller answered an error");
    check(fill_done, "fill_done");
    check(n_wr_frames == int'(BURSTS + 1 + OPS), $sformatf("write frames %0d", n_wr_frames));
    check(n_rd_frames == int'(READS), $sformatf("read frames %0d", n_rd_frames));
    check(n_rdat_frames == int'(READS), $sformatf("read-data frames %0d", n_rdat_frames));
    check(u_mig.n_writes == int'(BURSTS + 1 + OPS), "controller writes");
    check(u_mig.n_reads == int'(READS), "controller reads");
    done = 1'b1;
  end

endmodule
