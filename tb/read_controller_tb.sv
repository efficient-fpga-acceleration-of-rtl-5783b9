// read_controller_tb: one input data tile of a stride-2, 3 x 3 kernel layer
// with padding on a (TR, TC) = (2, 3) engine. The expected order of buffer
// reads (word address) and of shape-adapter controls (column, lane offset,
// input-map coordinates) is computed independently from the loop nest and
// compared read by read; the adapter controls must arrive exactly one cycle
// after their read. The window handshake is exercised with random delays,
// and the fill time of each window (reads + 2 cycles) is checked.
module read_controller_tb;
  localparam int TR = 2, TC = 3, W = TR*TC, AW = 8;
  localparam int K = 3, S = 2, P = 1, DR = 2, DC = 2;
  localparam int ROWS_L = (TR-1)*S + K, COLS_L = (TC-1)*S + K;
  localparam int XT = S*(DC*TC-1) + K, YT = S*(DR*TR-1) + K, WPC = (YT + W - 1) / W;
  localparam int MC = 2, RC = 2, CC = 2, ZC = 2;
  localparam int ROW0 = -1, COL0 = -1;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start = 1'b0, win_take = 1'b0;
  logic ibuf_rd_en, ad_wr_en, win_ready, busy;
  logic [AW-1:0] ibuf_rd_addr;
  logic [15:0] ad_col;
  logic signed [17:0] ad_row_off, ad_img_row0, ad_img_col;

  read_controller #(.TR(TR), .TC(TC), .AW(AW)) dut (
    .clk, .rst_n, .start,
    .m_cnt(16'(MC)), .r_cnt(16'(RC)), .c_cnt(16'(CC)), .z_cnt(16'(ZC)),
    .tile_row0(18'(ROW0)), .tile_col0(18'(COL0)),
    .rows_l(16'(ROWS_L)), .cols_l(16'(COLS_L)), .rstep(16'(TR*S)), .cstep(16'(TC*S)),
    .xt(16'(XT)), .wpc(16'(WPC)),
    .ibuf_rd_en, .ibuf_rd_addr, .ad_wr_en, .ad_col, .ad_row_off, .ad_img_row0, .ad_img_col,
    .win_ready, .win_take, .busy);

  typedef struct { int addr, col, row_off, row0, icol; } rd_t;
  rd_t exp_q [$];
  int  win_reads [$];
  int checks = 0, failures = 0, cycles = 0, n_rd = 0, n_ad = 0, windows = 0;
  bit  prev_rd = 0;
  rd_t prev_e;

  always @(posedge clk) cycles <= cycles + 1;

  // compare every read and every adapter write
  always @(posedge clk) if (rst_n) begin
    if (ad_wr_en) begin
      checks++;
      if (!prev_rd || int'(ad_col) != prev_e.col || int'(ad_row_off) != prev_e.row_off ||
          int'(ad_img_row0) != prev_e.row0 || int'(ad_img_col) != prev_e.icol) begin
        failures++;
        if (failures < 5) $display("adapter controls wrong at write %0d", n_ad);
      end
      n_ad++;
    end
    prev_rd = ibuf_rd_en;
    if (ibuf_rd_en) begin
      rd_t e;
      checks++;
      if (exp_q.size() == 0) begin failures++; end
      else begin
        e = exp_q.pop_front();
        prev_e = e;
        if (int'(ibuf_rd_addr) != e.addr) begin
          failures++;
          if (failures < 5) $display("read %0d: addr %0d expected %0d", n_rd, ibuf_rd_addr, e.addr);
        end
      end
      n_rd++;
    end
  end

  initial begin
    for (int mi = 0; mi < MC; mi++)
    for (int ri = 0; ri < RC; ri++)
    for (int ci = 0; ci < CC; ci++)
    for (int zi = 0; zi < ZC; zi++) begin
      automatic int ro = ri*TR*S;
      automatic int n = 0;
      for (int j = 0; j < COLS_L; j++)
        for (int wr = ro / W; wr <= (ro + ROWS_L - 1) / W; wr++) begin
          exp_q.push_back('{(zi*XT + ci*TC*S + j)*WPC + wr, j, ro - wr*W, ROW0 + ro,
                            COL0 + ci*TC*S + j});
          n++;
        end
      win_reads.push_back(n);
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    start = 1'b1;
    for (int w = 0; w < MC*RC*CC*ZC; w++) begin
      automatic int t0 = cycles;
      @(posedge clk); #1;
      start = 1'b0;
      win_take = 1'b0;
      while (!win_ready) begin @(posedge clk); #1; end
      checks++;
      if (cycles - t0 != win_reads[w] + 2) begin
        failures++;
        $display("window %0d filled in %0d cycles, expected %0d", w, cycles - t0, win_reads[w] + 2);
      end
      windows++;
      repeat ($urandom_range(0, 6)) begin @(posedge clk); #1; end
      checks++; if (!win_ready) failures++;       // ready holds until taken
      win_take = 1'b1;
    end
    @(posedge clk); #1;
    win_take = 1'b0;
    @(posedge clk); #1;
    checks++; if (busy || exp_q.size() != 0) begin failures++; $display("reads missing"); end
    $display("windows %0d, reads %0d", windows, n_rd);
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
