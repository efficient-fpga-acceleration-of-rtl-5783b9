// compute_tile: the 3D array of TM x TR x TC MAC units of ICAN.
//
// MAC (m, r, c) works on output pixel (m, r, c) of the current compute tile.
// The units have no connection among themselves: the pixel a[r][c] from the
// input reuse network is broadcast to the TM units of its (r, c) column, and
// the weight w[m] from the weight buffer is broadcast to the TR x TC units of
// output map m. All units share en and init (SIMD). init_val and acc are
// whole output-buffer words, packed with m most significant, then r, then c,
// so lane (m*TR + r)*TC + c holds output pixel (m, r, c).
// The structure follows the document; the packing order is this design's choice.
module compute_tile #(
  parameter int unsigned DW   = ican_pkg::DEF_DW,
  parameter int unsigned FRAC = ican_pkg::DEF_FRAC,
  parameter bit          FLOAT = 1'b0,   // 1: single-precision float MACs
  parameter int unsigned TM   = ican_pkg::DEF_TM,
  parameter int unsigned TR   = ican_pkg::DEF_TR,
  parameter int unsigned TC   = ican_pkg::DEF_TC
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic                                   en,
  input  logic                                   init,
  input  logic [TR-1:0][TC-1:0][DW-1:0]          a,
  input  logic [TM-1:0][DW-1:0]                  w,
  input  logic [TM-1:0][TR-1:0][TC-1:0][DW-1:0]  init_val,
  output logic [TM-1:0][TR-1:0][TC-1:0][DW-1:0]  acc
);

  for (genvar m = 0; m < TM; m++) begin : g_m
    for (genvar r = 0; r < TR; r++) begin : g_r
      for (genvar c = 0; c < TC; c++) begin : g_c
        mac_unit #(.DW(DW), .FRAC(FRAC), .FLOAT(FLOAT)) u_mac (
          .clk      (clk),
          .rst_n    (rst_n),
          .en       (en),
          .init     (init),
          .init_val (init_val[m][r][c]),
          .a        (a[r][c]),
          .w        (w[m]),
          .acc      (acc[m][r][c])
        );
      end
    end
  end

endmodule
