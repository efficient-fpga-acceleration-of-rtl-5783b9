// shape_adapter: reshapes input-buffer words into the 2D input reuse network.
//
// The input buffer stores each column of an input data tile as consecutive
// words of W = TR*TC pixels (tile row t in lane t mod W of word t div W). The
// adapter is a ROWS x COLS array of isolated registers, written one buffer
// word at a time into one column: network row i takes lane (i + row_off) of
// the word when that lane exists, where row_off is the tile row of network
// row 0 minus the tile row of the word's lane 0 (it may be negative). Each
// register has a multiplexer that substitutes zero when its pixel lies in the
// zero padding, i.e. outside rows [0, img_y) or columns [0, img_x) of the
// input map; img_row0 and img_col are the input-map coordinates of network
// row 0 and of the column being written.
// Timing: one word per cycle (wr_en), written at the clock edge; the array
// is read in parallel by the reuse network (cells).
// The register array with zero-padding multiplexers follows the document;
// the column-wise word format and lane selection are this design's choices.
module shape_adapter #(
  parameter int unsigned DW   = ican_pkg::DEF_DW,
  parameter int unsigned TR   = ican_pkg::DEF_TR,
  parameter int unsigned TC   = ican_pkg::DEF_TC,
  parameter int unsigned KMAX = ican_pkg::DEF_KMAX,
  parameter int unsigned SMAX = ican_pkg::DEF_SMAX,
  parameter int unsigned ROWS = (TR-1)*SMAX + KMAX,
  parameter int unsigned COLS = (TC-1)*SMAX + KMAX,
  parameter int unsigned W    = TR*TC
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              wr_en,
  input  logic [15:0]                       col,
  input  logic [W-1:0][DW-1:0]              word,
  input  logic signed [17:0]                row_off,
  input  logic signed [17:0]                img_row0,
  input  logic signed [17:0]                img_col,
  input  logic [15:0]                       img_y,
  input  logic [15:0]                       img_x,
  output logic [ROWS-1:0][COLS-1:0][DW-1:0] cells
);

  logic col_in_image;
  assign col_in_image = (img_col >= 0) && (img_col < $signed({2'b00, img_x}));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cells <= '0;
    end else if (wr_en) begin
      for (int i = 0; i < ROWS; i++) begin
        logic signed [17:0] lane;
        logic signed [17:0] img_row;
        lane    = 18'(i) + row_off;
        img_row = img_row0 + 18'(i);
        if (lane >= 0 && lane < 18'(W)) begin
          for (int j = 0; j < COLS; j++) begin
            if (col == 16'(j)) begin
              if (col_in_image && img_row >= 0 && img_row < $signed({2'b00, img_y}))
                cells[i][j] <= word[lane[15:0]];
              else
                cells[i][j] <= '0;
            end
          end
        end
      end
    end
  end

endmodule
