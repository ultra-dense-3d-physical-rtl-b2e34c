// m3d_pkg: constants and types shared by the M3D accelerator.
//
// The accelerator is eight identical compute sub-systems (CS) working in parallel,
// each a 16x16 weight-stationary systolic array with local SRAM buffers and a
// private 128-bit port into its 8 MB bank of on-chip RRAM (64 MB in total).
// The sub-system count, array size, RRAM capacity and bus width follow the
// design description; number formats, buffer organisation, the command word and
// the host address map are choices of this implementation.
package m3d_pkg;

  // Compute sub-system and array geometry.
  localparam int unsigned N_CS   = 8;    // parallel compute sub-systems
  localparam int unsigned ROWS   = 16;   // array rows = input channels per tile
  localparam int unsigned COLS   = 16;   // array columns = output channels per tile
  localparam int unsigned DATA_W = 8;    // signed weight / activation width
  localparam int unsigned ACC_W  = 32;   // signed partial-sum width

  // Memory system.
  localparam int unsigned BUS_W           = 128;              // per-bank RRAM bus
  localparam longint unsigned RRAM_TOTAL_BYTES = 64*1024*1024; // 64 MB on chip
  localparam int unsigned RRAM_BANK_BYTES = int'(RRAM_TOTAL_BYTES/longint'(N_CS)); // one 8 MB bank per CS
  localparam int unsigned RRAM_WORDS      = RRAM_BANK_BYTES*8/BUS_W;
  localparam int unsigned RRAM_AW         = $clog2(RRAM_WORDS);

  // Local SRAM buffers of one CS: 32 KB of input vectors, 32 KB of output vectors.
  localparam int unsigned IBUF_W     = ROWS*DATA_W;           // one input vector
  localparam int unsigned IBUF_DEPTH = 32*1024*8/IBUF_W;
  localparam int unsigned IBUF_AW    = $clog2(IBUF_DEPTH);
  localparam int unsigned OBUF_W     = COLS*ACC_W;            // one output vector
  localparam int unsigned OBUF_DEPTH = 32*1024*8/OBUF_W;
  localparam int unsigned OBUF_AW    = $clog2(OBUF_DEPTH);
  localparam int unsigned OBUF_SLICES = OBUF_W/BUS_W;         // host words per output vector

  // Host address map: {cs, region, word}.
  typedef enum logic [1:0] {
    REG_RRAM = 2'd0,   // word = RRAM bank word address (read / program)
    REG_IBUF = 2'd1,   // word = input buffer entry
    REG_OBUF = 2'd2,   // word = {output entry, 128-bit slice}
    REG_CTRL = 2'd3    // write: command + start; read: status
  } region_e;

  // One tile command: load a ROWSxCOLS weight tile from RRAM words
  // w_base..w_base+ROWS-1, push count input vectors from i_base upward and
  // write (or add into) count output vectors from o_base upward.
  typedef struct packed {
    logic                accumulate;
    logic [IBUF_AW:0]    count;
    logic [OBUF_AW-1:0]  o_base;
    logic [IBUF_AW-1:0]  i_base;
    logic [RRAM_AW-1:0]  w_base;
  } cs_cmd_t;

  localparam int unsigned CMD_W = $bits(cs_cmd_t);

endpackage
