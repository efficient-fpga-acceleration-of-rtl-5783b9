// input_reuse_network_tb: loads a random window and applies the serpentine
// shift schedule (K-1 west, 1 north, K-1 east, 1 north, ...) for every kernel
// size 1..KMAX and stride 1..SMAX. At kernel step (y, x) tap (r, c) must show
// the loaded pixel at row r*S + y, column c*S + x. The test also checks the
// K^2-cycle schedule length and that load takes one cycle.
module input_reuse_network_tb;
  import ican_pkg::*;
  localparam int TR = 3, TC = 4, KMAX = 5, SMAX = 3;
  localparam int ROWS = (TR-1)*SMAX + KMAX, COLS = (TC-1)*SMAX + KMAX;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic load = 1'b0;
  logic [ROWS-1:0][COLS-1:0][31:0] load_data = '0;
  shift_t shift = SHIFT_NONE;
  logic [15:0] stride = 16'd1;
  logic [TR-1:0][TC-1:0][31:0] taps;
  int checks = 0, failures = 0, steps = 0;

  input_reuse_network #(.TR(TR), .TC(TC), .KMAX(KMAX), .SMAX(SMAX)) dut (
    .clk, .rst_n, .load, .load_data, .shift, .stride, .taps);

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int k = 1; k <= KMAX; k++)
      for (int s = 1; s <= SMAX; s++) begin
        automatic int y = 0, x = 0, cyc = 0;
        for (int i = 0; i < ROWS; i++) for (int j = 0; j < COLS; j++) load_data[i][j] = $urandom;
        stride = 16'(s);
        load = 1'b1; shift = SHIFT_WEST;          // load wins over shift
        @(posedge clk); #1;
        load = 1'b0;
        for (int step = 0; step < k*k; step++) begin
          automatic int ny = y, nx = x;
          for (int r = 0; r < TR; r++) for (int c = 0; c < TC; c++) begin
            checks++;
            if (taps[r][c] !== load_data[r*s + y][c*s + x]) begin
              failures++;
              if (failures < 5) $display("K=%0d S=%0d step %0d tap(%0d,%0d) wrong %h %h %h", k, s, step, r, c, taps[r][c], load_data[r*s+y][c*s+x], dut.sr[r*s][c*s]);
            end
          end
          if (y % 2 == 0) begin if (x == k-1) ny = y + 1; else nx = x + 1; end
          else            begin if (x == 0)   ny = y + 1; else nx = x - 1; end
          if (step == k*k-1) shift = SHIFT_NONE;
          else if (ny != y)  shift = SHIFT_NORTH;
          else if (nx > x)   shift = SHIFT_WEST;
          else               shift = SHIFT_EAST;
          y = ny; x = nx;
          @(posedge clk); #1;
          cyc++;
        end
        checks++;
        if (cyc != k*k) failures++;
        steps += cyc;
      end
    $display("serpentine steps simulated: %0d", steps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
