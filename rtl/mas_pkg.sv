// mas_pkg: types and constants shared by the memory accessing system.
//
// The system moves fixed 32-byte bursts between an AXI master (the stimulus
// that stands in for the processor) and an AXI4 DDR3 controller, over a
// point-to-point 64-bit parallel channel between two FPGAs. This package holds
// the packet layout, the channel signal bundles and the stimulus kernels.
//
// Packet layout (one 64-bit header, then 0 or 4 data words):
//   header[63:32] = byte address, header[31:5] = reserved (0),
//   header[4:1]   = 4-bit transaction ID, header[0] = 1 for read, 0 for write.
// The low half of the header is the 32-bit command word {27'b0, ID, rw} that
// the AXI receiving modules build; the channel signals are active low, as the
// signal names in the channel description say. The bundle split into forward
// and backward structs is this design's own.
package mas_pkg;

  localparam int unsigned BURST_BYTES   = 32;  // fixed read/write granularity
  localparam int unsigned BEATS32       = 8;   // 32-bit AXI beats per burst
  localparam int unsigned BEATS64       = 4;   // 64-bit words per burst
  localparam int unsigned WR_FRAME_LEN  = 5;   // header + 4 data words
  localparam int unsigned RD_FRAME_LEN  = 1;   // header only
  localparam int unsigned RDAT_FRAME_LEN = 5;  // header + 4 read data words

  localparam logic [7:0] AXI_LEN_32B  = 8'd7;   // 8 beats of 4 bytes
  localparam logic [2:0] AXI_SIZE_4B  = 3'd2;
  localparam logic [1:0] AXI_BURST_INCR = 2'b01;
  localparam logic [1:0] AXI_RESP_OKAY  = 2'b00;

  typedef logic [3:0]  id_t;
  typedef logic [31:0] addr_t;

  // Command word as built by the AXI receiving modules.
  function automatic logic [31:0] cmd_word(id_t id, logic is_read);
    return {27'b0, id, is_read};
  endfunction

  function automatic logic [63:0] make_header(addr_t addr, id_t id, logic is_read);
    return {addr, cmd_word(id, is_read)};
  endfunction

  function automatic logic   hdr_is_read(logic [63:0] h); return h[0];     endfunction
  function automatic id_t    hdr_id     (logic [63:0] h); return h[4:1];   endfunction
  function automatic addr_t  hdr_addr   (logic [63:0] h); return h[63:32]; endfunction

  // One direction of the parallel channel, driven by the source.
  typedef struct packed {
    logic [63:0] data;
    logic        sof_n;
    logic        eof_n;
    logic        src_rdy_n;
    logic        src_dsc_n;
  } ch_fwd_t;

  // The same direction's signals driven by the destination.
  typedef struct packed {
    logic dst_rdy_n;
    logic dst_dsc_n;
  } ch_bwd_t;

  localparam ch_fwd_t CH_FWD_IDLE = '{data: '0, sof_n: 1'b1, eof_n: 1'b1, src_rdy_n: 1'b1, src_dsc_n: 1'b1};

  // The five STREAM-like kernels of the stimulus.
  typedef enum logic [2:0] {
    MODE_COPY  = 3'd0,
    MODE_ADD   = 3'd1,
    MODE_SCALE = 3'd2,
    MODE_TRIAD = 3'd3,
    MODE_GUPS  = 3'd4
  } stim_mode_e;

  // 16-bit Fibonacci LFSR, taps 16,14,13,11 (maximal length).
  function automatic logic [15:0] lfsr16_next(logic [15:0] s);
    return {s[14:0], s[15] ^ s[13] ^ s[12] ^ s[10]};
  endfunction

endpackage
