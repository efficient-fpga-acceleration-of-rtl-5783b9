// ican_pkg: types and default sizes shared by the ICAN convolution accelerator.
//
// The defaults are the main design point: a 3D compute tile of
// (TM, TR, TC) = (11, 7, 7) MAC units, data tiles (DZ, DM, DR, DC) = (16, 3, 2, 2)
// and 32-bit fixed-point words, sized for the five convolutional layers of
// AlexNet (largest kernel 11, largest stride 4). The buffer depths are the
// smallest powers of two that hold the data tiles of every AlexNet layer.
// The fixed-point format (16 fraction bits) and the 16-bit layer fields are
// this design's own choices.
package ican_pkg;

  // Word format
  localparam int unsigned DEF_DW   = 32;  // data word width (bits)
  localparam int unsigned DEF_FRAC = 16;  // fraction bits of the fixed-point format

  // Compute tile (T parameters)
  localparam int unsigned DEF_TM = 11;
  localparam int unsigned DEF_TR = 7;
  localparam int unsigned DEF_TC = 7;

  // Data tile multipliers (D parameters)
  localparam int unsigned DEF_DZ = 16;
  localparam int unsigned DEF_DM = 3;
  localparam int unsigned DEF_DR = 2;
  localparam int unsigned DEF_DC = 2;

  // Largest kernel size and stride the datapath supports
  localparam int unsigned DEF_KMAX = 11;
  localparam int unsigned DEF_SMAX = 4;

  // Buffer depths (per bank)
  localparam int unsigned DEF_IN_DEPTH  = 2048;
  localparam int unsigned DEF_W_DEPTH   = 8192;
  localparam int unsigned DEF_OUT_DEPTH = 16;

  // One convolutional layer, in the notation of the loop nest:
  // Z input maps of Y x X pixels, M output maps of R x C pixels,
  // K x K kernel, stride S, zero padding P on every edge of the input.
  typedef struct packed {
    logic [15:0] z;
    logic [15:0] m;
    logic [15:0] r;
    logic [15:0] c;
    logic [15:0] y;
    logic [15:0] x;
    logic [15:0] k;
    logic [15:0] s;
    logic [15:0] p;
  } layer_cfg_t;

  // Shift command of the input reuse network
  typedef enum logic [1:0] {
    SHIFT_NONE  = 2'd0,
    SHIFT_WEST  = 2'd1,
    SHIFT_EAST  = 2'd2,
    SHIFT_NORTH = 2'd3
  } shift_t;

  // Activity counters reported by the engine
  typedef struct packed {
    logic [31:0] mac_cycles;      // cycles in which the compute tile accumulated
    logic [31:0] buf_stall;       // cycles waiting for a double-buffer bank
    logic [31:0] adapter_stall;   // cycles waiting for the shape adapter
    logic [31:0] tiles;           // input/weight data tiles consumed
  } perf_t;

endpackage
