// ican_controller_tb: the hardware controller against a cycle-level model
// of its loop nest. The buffers and the read controller are replaced by
// random handshakes (banks become valid late, windows arrive late). For
// every window the test checks the network load, the K^2 MAC cycles, the
// serpentine shift commands and the weight address issued each cycle, the
// accumulator init and zero-init flags, the partial-sum reads, and the
// order of the output-buffer stores; it also counts bank releases, output
// commits and the number of MAC cycles against the loop-nest trip count.
module ican_controller_tb;
  import ican_pkg::*;
  localparam int TM = 2, TR = 2, TC = 2, DZ = 2, DM = 2, DR = 1, DC = 2;
  localparam int Z = 3, M = 5, R = 3, C = 5, K = 3, S = 1, PAD = 1;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start = 1'b0, busy, done;
  layer_cfg_t cfg, cfg_q;
  perf_t perf;
  logic in_valid = 1'b0, w_valid = 1'b0, o_ready = 1'b1, win_ready = 1'b0;
  logic in_release, w_rd_en, w_release, o_rd_en, o_wr_en, o_commit, rc_start, win_take;
  logic [12:0] w_rd_addr;
  logic [3:0]  o_rd_addr, o_wr_addr;
  logic [15:0] rc_m_cnt, rc_r_cnt, rc_c_cnt, rc_z_cnt, rows_l, cols_l, rstep, cstep, xt, wpc;
  logic signed [17:0] rc_tile_row0, rc_tile_col0;
  logic net_load, mac_en, mac_init, init_zero;
  shift_t net_shift;

  ican_controller #(.TM(TM), .TR(TR), .TC(TC), .DZ(DZ), .DM(DM), .DR(DR), .DC(DC)) dut (.*);

  typedef struct { int wbase, oaddr, zi, z2, last; } win_t;
  win_t wins [$];
  int   stores_exp [$];
  int checks = 0, failures = 0;
  int n_mac = 0, n_rel = 0, n_commit = 0, n_done = 0, n_oread = 0, exp_oread = 0;
  int exp_tiles = 0, exp_otiles = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 8) $display("%0t: %s", $time, what); end
  endtask

  // expected window sequence
  initial begin
    for (int m2 = 0; m2 < M; m2 += DM*TM)
    for (int r2 = 0; r2 < R; r2 += DR*TR)
    for (int c2 = 0; c2 < C; c2 += DC*TC) begin
      exp_otiles++;
      for (int z2 = 0; z2 < Z; z2 += DZ) begin
        automatic int mc = (M - m2 + TM - 1) / TM, rc = (R - r2 + TR - 1) / TR;
        automatic int cc = (C - c2 + TC - 1) / TC, zc = (Z - z2 < DZ) ? Z - z2 : DZ;
        if (mc > DM) mc = DM;
        if (rc > DR) rc = DR;
        if (cc > DC) cc = DC;
        exp_tiles++;
        for (int mi = 0; mi < mc; mi++) for (int ri = 0; ri < rc; ri++)
        for (int ci = 0; ci < cc; ci++) for (int zi = 0; zi < zc; zi++) begin
          wins.push_back('{(mi*DZ + zi)*K*K, (mi*DR + ri)*DC + ci, zi, z2, zi == zc-1});
          if (zi == zc-1) stores_exp.push_back((mi*DR + ri)*DC + ci);
          if (zi == 0 && z2 != 0) exp_oread++;
        end
      end
    end
  end

  // random bank and window availability
  always @(posedge clk) begin
    if (in_release) in_valid <= 1'b0; else if ($urandom_range(0, 9) == 0) in_valid <= 1'b1;
    if (w_release)  w_valid  <= 1'b0; else if ($urandom_range(0, 9) == 0) w_valid  <= 1'b1;
    if (win_take)   win_ready <= 1'b0; else if ($urandom_range(0, 3) == 0) win_ready <= 1'b1;
    if (o_commit)   o_ready  <= 1'b0; else if ($urandom_range(0, 7) == 0) o_ready  <= 1'b1;
  end

  // per-window monitor
  win_t cur;
  int   k = -1, y = 0, x = 0;
  always @(posedge clk) if (rst_n) begin
    if (mac_en) n_mac++;
    if (in_release) begin n_rel++; chk(w_release, "input and weight banks released together"); end
    if (o_commit) n_commit++;
    if (done) n_done++;
    if (o_rd_en) n_oread++;
    if (o_wr_en) begin
      chk(stores_exp.size() > 0 && int'(o_wr_addr) == stores_exp[0], "store address order");
      if (stores_exp.size() > 0) void'(stores_exp.pop_front());
    end
    if (net_load) begin
      chk(win_take, "network load takes the adapter window");
      chk(wins.size() > 0, "unexpected window");
      if (wins.size() > 0) cur = wins.pop_front();
      chk(w_rd_en && int'(w_rd_addr) == cur.wbase, "weight read of step 0");
      chk(o_rd_en == (cur.zi == 0 && cur.z2 != 0), "partial-sum read");
      if (o_rd_en) chk(int'(o_rd_addr) == cur.oaddr, "partial-sum read address");
      k = 0; y = 0; x = 0;
    end else if (mac_en) begin
      automatic int ny = y, nx = x;
      automatic shift_t es;
      chk(k >= 0 && k < K*K, "MAC cycle outside a window");
      chk(mac_init == (k == 0 && cur.zi == 0), "accumulator init flag");
      chk(init_zero == (cur.z2 == 0), "zero init on the first input tile");
      if (y % 2 == 0) begin if (x == K-1) ny = y + 1; else nx = x + 1; end
      else            begin if (x == 0)   ny = y + 1; else nx = x - 1; end
      if (k == K*K-1) es = SHIFT_NONE;
      else if (ny != y) es = SHIFT_NORTH;
      else if (nx > x)  es = SHIFT_WEST;
      else              es = SHIFT_EAST;
      chk(net_shift == es, "serpentine shift");
      if (k < K*K-1) chk(w_rd_en && int'(w_rd_addr) == cur.wbase + ny*K + nx, "weight address");
      y = ny; x = nx; k++;
    end else begin
      chk(net_shift == SHIFT_NONE, "no shift outside MAC cycles");
    end
  end

  initial begin
    cfg = '{z: 16'(Z), m: 16'(M), r: 16'(R), c: 16'(C), y: 16'(R), x: 16'(C),
            k: 16'(K), s: 16'(S), p: 16'(PAD)};
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1 start = 1'b1;
    @(posedge clk); #1 start = 1'b0;
    while (!done) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    chk(wins.size() == 0, "all windows run");
    chk(stores_exp.size() == 0, "all compute tiles stored");
    chk(n_mac == (Z*K*K) * 3 * 2 * 3, "MAC cycles = loop-nest trip count");
    chk(int'(perf.mac_cycles) == n_mac, "MAC cycle counter");
    chk(n_rel == exp_tiles && int'(perf.tiles) == exp_tiles, "one release per data tile");
    chk(n_commit == exp_otiles, "one commit per output tile");
    chk(n_oread == exp_oread, "partial-sum reads");
    chk(n_done == 1 && !busy, "done once, then idle");
    chk(perf.buf_stall > 0 && perf.adapter_stall > 0, "stalls counted");
    $display("MAC cycles %0d, data tiles %0d, output tiles %0d, buffer stalls %0d, adapter stalls %0d",
             n_mac, n_rel, n_commit, perf.buf_stall, perf.adapter_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
