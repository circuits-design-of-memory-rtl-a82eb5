// axi_mig_model: behavioural stand-in for the DDR3 controller with AXI4
// slave port and the DDR3 memory behind it. Not synthesizable.
//
// It raises init_calib_complete INIT_CYCLES clocks after reset, then serves
// one write and one read transaction at a time on a 64-bit AXI4 port. Memory
// is a sparse associative array of 64-bit words; unwritten words read as 0.
// When STALL is non-zero, each ready is dropped at random (about one cycle in
// STALL) to exercise back-pressure; READ_LAT clocks pass between AR and the
// first R beat. Write strobes are honoured byte by byte.
module axi_mig_model #(
  parameter int unsigned INIT_CYCLES = 20,
  parameter int unsigned READ_LAT    = 6,
  parameter int unsigned STALL       = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        init_calib_complete,
  input  logic [3:0]  awid,
  input  logic [31:0] awaddr,
  input  logic [7:0]  awlen,
  input  logic [2:0]  awsize,
  input  logic [1:0]  awburst,
  input  logic        awvalid,
  output logic        awready,
  input  logic [63:0] wdata,
  input  logic [7:0]  wstrb,
  input  logic        wlast,
  input  logic        wvalid,
  output logic        wready,
  output logic [3:0]  bid,
  output logic [1:0]  bresp,
  output logic        bvalid,
  input  logic        bready,
  input  logic [3:0]  arid,
  input  logic [31:0] araddr,
  input  logic [7:0]  arlen,
  input  logic [2:0]  arsize,
  input  logic [1:0]  arburst,
  input  logic        arvalid,
  output logic        arready,
  output logic [3:0]  rid,
  output logic [63:0] rdata,
  output logic [1:0]  rresp,
  output logic        rlast,
  output logic        rvalid,
  input  logic        rready
);

  logic [63:0] mem [logic [28:0]];
  int unsigned n_writes, n_reads, n_stalls;

  function automatic logic stall_now();
    return (STALL != 0) && ($urandom % STALL == 0);
  endfunction

  function automatic logic [63:0] rd_word(logic [28:0] a);
    return mem.exists(a) ? mem[a] : 64'd0;
  endfunction

  // Read one 32-bit word at a byte address (for checking).
  function automatic logic [31:0] peek32(logic [31:0] a);
    logic [63:0] w;
    w = rd_word(a[31:3]);
    return a[2] ? w[63:32] : w[31:0];
  endfunction

  // initialisation
  initial begin
    init_calib_complete = 1'b0;
    #2 wait (rst_n === 1'b1);
    repeat (INIT_CYCLES) @(posedge clk);
    init_calib_complete = 1'b1;
  end

  // write channel
  initial begin
    logic [31:0] a;
    logic [3:0]  id;
    awready = 1'b0; wready = 1'b0; bvalid = 1'b0; bid = '0; bresp = 2'b00;
    n_writes = 0; n_stalls = 0;
    forever begin
      @(posedge clk);
      if (!rst_n) continue;
      awready <= !stall_now();
      if (awvalid && awready) begin
        a  = awaddr;
        id = awid;
        awready <= 1'b0;
        for (int beat = 0; beat <= int'(awlen); ) begin
          @(posedge clk);
          if (wvalid && wready) begin
            logic [63:0] old;
            old = rd_word(a[31:3]);
            for (int b = 0; b < 8; b++) if (wstrb[b]) old[b*8 +: 8] = wdata[b*8 +: 8];
            mem[a[31:3]] = old;
            a = a + 32'd8;
            beat++;
          end
          wready <= (beat <= int'(awlen)) && !stall_now();
          if (!wready) n_stalls++;
        end
        wready <= 1'b0;
        @(posedge clk);
        bvalid <= 1'b1; bid <= id; bresp <= 2'b00;
        do @(posedge clk); while (!bready);
        bvalid <= 1'b0;
        n_writes++;
      end
    end
  end

  // read channel
  initial begin
    logic [31:0] a;
    logic [3:0]  id;
    logic [7:0]  len;
    arready = 1'b0; rvalid = 1'b0; rlast = 1'b0; rid = '0; rdata = '0; rresp = 2'b00;
    n_reads = 0;
    forever begin
      @(posedge clk);
      if (!rst_n) continue;
      arready <= !stall_now();
      if (arvalid && arready) begin
        a = araddr; id = arid; len = arlen;
        arready <= 1'b0;
        repeat (READ_LAT) @(posedge clk);
        for (int beat = 0; beat <= int'(len); beat++) begin
          rvalid <= 1'b1; rid <= id; rresp <= 2'b00;
          rdata  <= rd_word(a[31:3]);
          rlast  <= (beat == int'(len));
          do @(posedge clk); while (!rready);
          a = a + 32'd8;
        end
        rvalid <= 1'b0; rlast <= 1'b0;
        n_reads++;
      end
    end
  end

endmodule
