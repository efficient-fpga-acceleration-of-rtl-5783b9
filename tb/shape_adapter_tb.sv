// shape_adapter_tb: writes random buffer words into random columns with
// random lane offsets and image coordinates, and compares the whole register
// array with a model: row i of the written column takes lane i + row_off
// when that lane exists, and zero when the pixel lies outside the image.
module shape_adapter_tb;
  localparam int TR = 2, TC = 3, KMAX = 3, SMAX = 2;
  localparam int ROWS = (TR-1)*SMAX + KMAX, COLS = (TC-1)*SMAX + KMAX, W = TR*TC;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic wr_en = 1'b0;
  logic [15:0] col = '0, img_y = 16'd6, img_x = 16'd6;
  logic [W-1:0][31:0] word = '0;
  logic signed [17:0] row_off = '0, img_row0 = '0, img_col = '0;
  logic [ROWS-1:0][COLS-1:0][31:0] cells;
  logic [31:0] model [ROWS][COLS];
  int checks = 0, failures = 0, zeros = 0;

  shape_adapter #(.TR(TR), .TC(TC), .KMAX(KMAX), .SMAX(SMAX)) dut (
    .clk, .rst_n, .wr_en, .col, .word, .row_off, .img_row0, .img_col, .img_y, .img_x, .cells);

  initial begin
    foreach (model[i, j]) model[i][j] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      wr_en    = ($urandom_range(0, 3) != 0);
      col      = 16'($urandom_range(0, COLS-1));
      row_off  = 18'(int'($urandom_range(0, 2*W)) - W);
      img_row0 = 18'(int'($urandom_range(0, 10)) - 3);
      img_col  = 18'(int'($urandom_range(0, 9)) - 2);
      for (int l = 0; l < W; l++) word[l] = $urandom | 32'h1;
      if (wr_en)
        for (int i = 0; i < ROWS; i++) begin
          automatic int lane = i + int'(row_off);
          automatic int ir = int'(img_row0) + i;
          if (lane >= 0 && lane < W) begin
            if (ir >= 0 && ir < int'(img_y) && int'(img_col) >= 0 && int'(img_col) < int'(img_x))
              model[i][col] = word[lane];
            else begin
              model[i][col] = '0;
              zeros++;
            end
          end
        end
      @(posedge clk); #1;
      for (int i = 0; i < ROWS; i++) for (int j = 0; j < COLS; j++) begin
        checks++;
        if (cells[i][j] !== model[i][j]) begin
          failures++;
          if (failures < 5) $display("write %0d cell(%0d,%0d) %h expected %h", n, i, j, cells[i][j], model[i][j]);
        end
      end
    end
    checks++; if (zeros == 0) failures++;
    $display("zero-padded cells written: %0d", zeros);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
