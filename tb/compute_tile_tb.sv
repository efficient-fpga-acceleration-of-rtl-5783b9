// compute_tile_tb: a 3 x 2 x 4 compute tile accumulating random pixels and
// weights over several cycles; every accumulator is compared with the sum of
// products w[m] * a[r][c] it should hold (weights broadcast over the RC
// plane, pixels broadcast over the M direction), including a restart from
// per-unit initial values.
module compute_tile_tb;
  localparam int TM = 3, TR = 2, TC = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic en = 1'b0, init = 1'b0;
  logic [TR-1:0][TC-1:0][31:0]        a = '0;
  logic [TM-1:0][31:0]                w = '0;
  logic [TM-1:0][TR-1:0][TC-1:0][31:0] init_val = '0, acc;
  int model [TM][TR][TC];
  int checks = 0, failures = 0;

  compute_tile #(.TM(TM), .TR(TR), .TC(TC)) dut (.clk, .rst_n, .en, .init, .a, .w, .init_val, .acc);

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      en   = ($urandom_range(0, 4) != 0);
      init = (i % 37 == 0);
      for (int r = 0; r < TR; r++) for (int c = 0; c < TC; c++)
        a[r][c] = int'($urandom_range(0, 1 << 19)) - (1 << 18);
      for (int m = 0; m < TM; m++) w[m] = int'($urandom_range(0, 1 << 19)) - (1 << 18);
      for (int m = 0; m < TM; m++) for (int r = 0; r < TR; r++) for (int c = 0; c < TC; c++)
        init_val[m][r][c] = $urandom;
      if (en)
        for (int m = 0; m < TM; m++) for (int r = 0; r < TR; r++) for (int c = 0; c < TC; c++)
          model[m][r][c] = (init ? int'(init_val[m][r][c]) : model[m][r][c]) +
                           int'((longint'(int'(a[r][c])) * longint'(int'(w[m]))) >>> 16);
      else if (i == 0)
        for (int m = 0; m < TM; m++) for (int r = 0; r < TR; r++) for (int c = 0; c < TC; c++)
          model[m][r][c] = 0;
      @(posedge clk); #1;
      for (int m = 0; m < TM; m++) for (int r = 0; r < TR; r++) for (int c = 0; c < TC; c++) begin
        checks++;
        if (int'(acc[m][r][c]) != model[m][r][c]) begin
          failures++;
          if (failures < 5) $display("step %0d mac(%0d,%0d,%0d): %0d expected %0d", i, m, r, c,
                                     int'(acc[m][r][c]), model[m][r][c]);
        end
      end
    end
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
