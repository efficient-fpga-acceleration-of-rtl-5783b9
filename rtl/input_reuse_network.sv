// input_reuse_network: the 2D register array that feeds ICAN's compute tile.
//
// ROWS x COLS registers, ROWS = (TR-1)*SMAX + KMAX and COLS = (TC-1)*SMAX + KMAX,
// i.e. the TR x TC strided positions of the compute tile plus the guard
// registers along the eastern and southern edges. The whole array is loaded
// in one cycle (load=1) from the shape adapter and then shifted as one
// systolic array: WEST moves every value one column towards column 0, EAST one
// column back, NORTH one row towards row 0. West/east shifts wrap around
// (each row is a ring); the north shift does not wrap and fills the last row
// with zeros, since only one of the two directions needs the wrap. A
// serpentine schedule (K-1 west, 1 north, K-1 east, 1 north, ...) makes every
// register visit its K x K neighbourhood in K^2 cycles.
// Compute-tile position (r, c) reads register (r*s, c*s), s being the layer
// stride; a multiplexer per tap selects among strides 1..SMAX.
// Timing: load and shifts take effect at the clock edge; taps are register
// outputs (no combinational path from inputs). load has priority over shift.
// The array, guard registers, wrap-around and shift pattern follow the
// document; the zero fill and the per-tap stride multiplexer are this design's choices.
module input_reuse_network
  import ican_pkg::*;
#(
  parameter int unsigned DW   = ican_pkg::DEF_DW,
  parameter int unsigned TR   = ican_pkg::DEF_TR,
  parameter int unsigned TC   = ican_pkg::DEF_TC,
  parameter int unsigned KMAX = ican_pkg::DEF_KMAX,
  parameter int unsigned SMAX = ican_pkg::DEF_SMAX,
  parameter int unsigned ROWS = (TR-1)*SMAX + KMAX,
  parameter int unsigned COLS = (TC-1)*SMAX + KMAX
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 load,
  input  logic [ROWS-1:0][COLS-1:0][DW-1:0]    load_data,
  input  shift_t                               shift,
  input  logic [15:0]                          stride,
  output logic [TR-1:0][TC-1:0][DW-1:0]        taps
);

  logic [ROWS-1:0][COLS-1:0][DW-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr <= '0;
    end else if (load) begin
      sr <= load_data;
    end else begin
      unique case (shift)
        SHIFT_WEST: begin
          for (int i = 0; i < ROWS; i++)
            for (int j = 0; j < COLS; j++)
              sr[i][j] <= sr[i][(j+1) % COLS];
        end
        SHIFT_EAST: begin
          for (int i = 0; i < ROWS; i++)
            for (int j = 0; j < COLS; j++)
              sr[i][j] <= sr[i][(j+COLS-1) % COLS];
        end
        SHIFT_NORTH: begin
          for (int i = 0; i < ROWS-1; i++)
            sr[i] <= sr[i+1];
          sr[ROWS-1] <= '0;
        end
        default: ;
      endcase
    end
  end

  // Stride-selected taps: tap (r, c) = sr[r*s][c*s]
  always_comb begin
    taps = '0;
    for (int s = 1; s <= SMAX; s++) begin
      if (stride == 16'(s)) begin
        for (int r = 0; r < TR; r++)
          for (int c = 0; c < TC; c++)
            taps[r][c] = sr[r*s][c*s];
      end
    end
  end

endmodule
