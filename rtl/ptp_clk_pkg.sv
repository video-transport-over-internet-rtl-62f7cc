// Shared types and constants of the PTP adjustable clock and of the hardware
// PTP emulation.
//
// The time kept by the clock is a 48-bit seconds count and a 32-bit
// nanoseconds count, as PTP timestamps are. Commands travel from the
// processor-facing AXI4-Lite side to the counter side as a small struct made
// of an opcode and a 32-bit operand; the sampled time travels back as an
// 80-bit struct. The Gray-code helpers serve the asynchronous FIFO pointers
// and the Gray counters of the emulation.
//
// The 48/32-bit time widths and the 22-bit OFFSET_PPM follow the original
// design; the command struct and opcodes are this design's own.
package ptp_clk_pkg;

  localparam int unsigned SEC_W   = 48;          // seconds counter width
  localparam int unsigned NS_W    = 32;          // nanoseconds counter width
  localparam int unsigned PPM_W   = 22;          // PICXO OFFSET_PPM width (signed)
  localparam int unsigned DATA_W  = 32;          // AXI4-Lite data width
  localparam int unsigned NS_PER_S = 1_000_000_000;

  // Register indices of the AXI4-Lite map (byte address = index * 4)
  typedef enum logic [2:0] {
    REG_OFFSET_S   = 3'd0,   // write: add a signed offset to the seconds
    REG_OFFSET_NS  = 3'd1,   // write: add a signed offset to the nanoseconds
    REG_UPDATE_PPM = 3'd2,   // write: new frequency offset for the PICXO
    REG_SAMPLE     = 3'd3,   // write: sample the counter into regs 4..6
    REG_SEC_MSB    = 3'd4,   // read: bits 47:32 of the sampled seconds
    REG_SEC_LSB    = 3'd5,   // read: bits 31:0 of the sampled seconds
    REG_NS         = 3'd6    // read: sampled nanoseconds
  } reg_idx_e;

  // Commands crossing from the AXI clock domain to the HDMI clock domain
  typedef enum logic [1:0] {
    CMD_OFFSET_S  = 2'd0,
    CMD_OFFSET_NS = 2'd1,
    CMD_PPM       = 2'd2,
    CMD_SAMPLE    = 2'd3
  } cmd_op_e;

  typedef struct packed {
    cmd_op_e           op;
    logic [DATA_W-1:0] data;
  } clk_cmd_t;

  typedef struct packed {
    logic [SEC_W-1:0] sec;
    logic [NS_W-1:0]  ns;
  } ptp_time_t;

  function automatic logic [63:0] bin2gray(input logic [63:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [63:0] gray2bin(input logic [63:0] g);
    logic [63:0] b;
    b[63] = g[63];
    for (int i = 62; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

endpackage
