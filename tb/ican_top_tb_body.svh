// Shared body of the end-to-end accelerator testbenches.
//
// The including module defines the localparams P_* (the accelerator's
// sizes), the layer list (N_LAYERS, layer_list) and instantiates ican_top as
// `dut` on clk/rst_n and the bus-side signals declared here. The body acts as
// the memory side: it cuts each layer's input maps and weights into data
// tiles in the order m2, r2, c2, z2, writes them into the free buffer banks
// (with random gaps, so the engine sometimes stalls), drains each finished
// output tile and compares it with a direct evaluation of the convolution
// loop nest. Zero-padding positions of the input tiles are filled with
// garbage, so any missing zero substitution is caught.
// With P_FLOAT = 1 the words are single-precision floats and the reference
// adds the products of each output pixel in the order the engine does:
// input map by input map, and within a K x K window row by row, left to
// right on even rows and right to left on odd rows (the serpentine walk of
// the input reuse network). Each product and each sum is rounded to single
// precision, so the comparison stays exact.

import ican_pkg::*;

localparam int unsigned P_W  = P_TR * P_TC;
localparam int unsigned P_IN_AW = $clog2(P_IN_DEPTH);
localparam int unsigned P_W_AW  = $clog2(P_W_DEPTH);
localparam int unsigned P_O_AW  = (P_OUT_DEPTH > 1) ? $clog2(P_OUT_DEPTH) : 1;

logic clk = 1'b0;
logic rst_n = 1'b0;
always #5 clk = ~clk;

logic                         start = 1'b0;
layer_cfg_t                   cfg;
logic                         busy, done;
perf_t                        perf;
logic                         in_ready, w_ready, out_valid;
logic                         in_wr_en = 1'b0, w_wr_en = 1'b0, out_rd_en = 1'b0;
logic                         in_commit = 1'b0, w_commit = 1'b0, out_release = 1'b0;
logic [P_IN_AW-1:0]           in_wr_addr = '0;
logic [P_W_AW-1:0]            w_wr_addr = '0;
logic [P_O_AW-1:0]            out_rd_addr = '0;
logic [P_W*P_DW-1:0]          in_wr_data = '0;
logic [P_TM*P_DW-1:0]         w_wr_data = '0;
logic [P_TM*P_W*P_DW-1:0]     out_rd_data;

int checks = 0, failures = 0;
int cycles = 0;
always @(posedge clk) cycles <= cycles + 1;

// mechanism counters
int n_buf_stall = 0, n_adapter_stall = 0, n_pad = 0, n_reload = 0, n_edge = 0;
int n_stride1 = 0, n_stride_gt1 = 0, n_out_tiles = 0;

// current layer data
int A[];      // [z][y][x]
int Wt[];     // [m][z][ky][kx]
int Bref[];   // [m][r][c]
layer_cfg_t L;

function automatic int a_idx(int z, int y, int x);  return (z*int'(L.y) + y)*int'(L.x) + x; endfunction
function automatic int w_idx(int m, int z, int y, int x);
  return ((m*int'(L.z) + z)*int'(L.k) + y)*int'(L.k) + x;
endfunction
function automatic int b_idx(int m, int r, int c); return (m*int'(L.r) + r)*int'(L.c) + c; endfunction

function automatic int fx_mul(int a, int w);
  longint p = longint'(a) * longint'(w);
  return int'(p >>> P_FRAC);
endfunction

// single-precision bits <-> real (subnormals flushed to zero)
function automatic real from_f(logic [31:0] b);
  if (b[30:23] == 8'd0) return 0.0;
  return $bitstoreal({b[31], 11'(int'(b[30:23]) - 127 + 1023), b[22:0], 29'd0});
endfunction
function automatic logic [31:0] to_f(real v);
  logic [63:0] q = $realtobits(v);
  int          e;
  logic [24:0] hi;
  logic [28:0] lo;
  if (q[62:52] == 11'd0) return 32'd0;
  e  = int'(q[62:52]) - 1023 + 127;
  hi = {2'b01, q[51:29]};
  lo = q[28:0];
  if (lo[28] && ((|lo[27:0]) || hi[0])) hi = hi + 25'd1;
  if (hi[24]) begin hi = hi >> 1; e++; end
  if (e <= 0)   return 32'd0;
  if (e >= 255) return {q[63], 8'hFF, 23'd0};
  return {q[63], 8'(e), hi[22:0]};
endfunction

function automatic int rnd_val();
  if (P_FLOAT)   // about -2.0 .. 2.0, all 24 significand bits random
    return int'(to_f((real'($urandom_range(0, 1 << 24)) - real'(1 << 23)) / real'(1 << 22)));
  return int'($urandom_range(0, 1 << 18)) - (1 << 17);   // about -2.0 .. 2.0
endfunction

task automatic make_layer();
  A    = new[int'(L.z*L.y*L.x)];
  Wt   = new[int'(L.m*L.z*L.k*L.k)];
  Bref = new[int'(L.m*L.r*L.c)];
  foreach (A[i])  A[i]  = rnd_val();
  foreach (Wt[i]) Wt[i] = rnd_val();
  for (int m = 0; m < int'(L.m); m++)
    for (int r = 0; r < int'(L.r); r++)
      for (int c = 0; c < int'(L.c); c++) begin
        int s = 0;
        for (int z = 0; z < int'(L.z); z++)
          for (int y = 0; y < int'(L.k); y++)
            for (int xs = 0; xs < int'(L.k); xs++) begin
              int x  = (y % 2 == 0) ? xs : int'(L.k) - 1 - xs;
              int iy = int'(L.s)*r + y - int'(L.p);
              int ix = int'(L.s)*c + x - int'(L.p);
              if (iy >= 0 && iy < int'(L.y) && ix >= 0 && ix < int'(L.x)) begin
                if (P_FLOAT)
                  s = int'(to_f(from_f(32'(s)) +
                                from_f(to_f(from_f(32'(A[a_idx(z, iy, ix)])) *
                                            from_f(32'(Wt[w_idx(m, z, y, x)]))))));
                else
                  s += fx_mul(A[a_idx(z, iy, ix)], Wt[w_idx(m, z, y, x)]);
              end
            end
        Bref[b_idx(m, r, c)] = s;
      end
endtask

// advance one clock; inputs change 1 time unit after the edge
task automatic tick();
  @(posedge clk);
  #1;
endtask

task automatic random_gap();
  int g = int'($urandom_range(0, 3));
  if (g == 0) repeat (int'($urandom_range(5, 60))) tick();
endtask

// Memory side: fill input and weight tiles in loop-nest order
task automatic feed_layer();
  int S = int'(L.s), K = int'(L.k);
  int XT = S*(P_DC*P_TC-1) + K;
  int YT = S*(P_DR*P_TR-1) + K;
  int WPC = (YT + P_W - 1) / P_W;
  for (int m2 = 0; m2 < int'(L.m); m2 += P_DM*P_TM)
  for (int r2 = 0; r2 < int'(L.r); r2 += P_DR*P_TR)
  for (int c2 = 0; c2 < int'(L.c); c2 += P_DC*P_TC)
  for (int z2 = 0; z2 < int'(L.z); z2 += P_DZ) begin
    int zc = (int'(L.z) - z2 < P_DZ) ? int'(L.z) - z2 : P_DZ;
    random_gap();
    // input tile
    while (!in_ready) tick();
    for (int zi = 0; zi < zc; zi++)
      for (int col = 0; col < XT; col++)
        for (int wr = 0; wr < WPC; wr++) begin
          logic [P_W*P_DW-1:0] word;
          for (int l = 0; l < P_W; l++) begin
            int t  = wr*P_W + l;
            int iy = r2*S - int'(L.p) + t;
            int ix = c2*S - int'(L.p) + col;
            if (iy >= 0 && iy < int'(L.y) && ix >= 0 && ix < int'(L.x))
              word[l*P_DW +: P_DW] = A[a_idx(z2+zi, iy, ix)];
            else
              word[l*P_DW +: P_DW] = 32'hDEAD_0000 | 32'(l);   // must never reach a MAC
          end
          in_wr_en <= 1'b1; in_wr_addr <= P_IN_AW'((zi*XT + col)*WPC + wr); in_wr_data <= word;
          tick();
        end
    in_wr_en <= 1'b0; in_commit <= 1'b1; tick(); in_commit <= 1'b0;
    // weight tile
    while (!w_ready) tick();
    for (int mi = 0; mi < P_DM; mi++)
      for (int zi = 0; zi < zc; zi++)
        for (int y = 0; y < K; y++)
          for (int x = 0; x < K; x++) begin
            logic [P_TM*P_DW-1:0] word;
            for (int l = 0; l < P_TM; l++) begin
              int m = m2 + mi*P_TM + l;
              word[l*P_DW +: P_DW] = (m < int'(L.m)) ? Wt[w_idx(m, z2+zi, y, x)] : 32'd0;
            end
            w_wr_en <= 1'b1; w_wr_addr <= P_W_AW'(((mi*P_DZ + zi)*K + y)*K + x); w_wr_data <= word;
            tick();
          end
    w_wr_en <= 1'b0; w_commit <= 1'b1; tick(); w_commit <= 1'b0;
  end
endtask

// Memory side: drain finished output tiles and compare
task automatic drain_layer();
  for (int m2 = 0; m2 < int'(L.m); m2 += P_DM*P_TM)
  for (int r2 = 0; r2 < int'(L.r); r2 += P_DR*P_TR)
  for (int c2 = 0; c2 < int'(L.c); c2 += P_DC*P_TC) begin
    random_gap();
    while (!out_valid) tick();
    n_out_tiles++;
    for (int mi = 0; mi < P_DM; mi++)
    for (int ri = 0; ri < P_DR; ri++)
    for (int ci = 0; ci < P_DC; ci++) begin
      out_rd_en <= 1'b1; out_rd_addr <= P_O_AW'((mi*P_DR + ri)*P_DC + ci);
      tick();
      out_rd_en <= 1'b0;
      for (int m = 0; m < P_TM; m++)
      for (int r = 0; r < P_TR; r++)
      for (int c = 0; c < P_TC; c++) begin
        int om = m2 + mi*P_TM + m, orow = r2 + ri*P_TR + r, oc = c2 + ci*P_TC + c;
        if (om < int'(L.m) && orow < int'(L.r) && oc < int'(L.c)) begin
          int got = int'(out_rd_data[((m*P_TR + r)*P_TC + c)*P_DW +: P_DW]);
          checks++;
          if (got !== Bref[b_idx(om, orow, oc)]) begin
            failures++;
            if (failures < 10)
              $display("MISMATCH layer out(%0d,%0d,%0d) got %0d exp %0d", om, orow, oc,
                       got, Bref[b_idx(om, orow, oc)]);
          end
        end else begin
          n_edge++;
        end
      end
      tick();
    end
    out_release <= 1'b1; tick(); out_release <= 1'b0;
  end
endtask

// expected compute cycles of a layer: Z*ceil(M/TM)*ceil(R/TR)*ceil(C/TC)*K^2 (with
// partial tiles counted as the loop nest runs them)
function automatic int expected_mac_cycles();
  int n = 0;
  for (int m2 = 0; m2 < int'(L.m); m2 += P_DM*P_TM)
  for (int r2 = 0; r2 < int'(L.r); r2 += P_DR*P_TR)
  for (int c2 = 0; c2 < int'(L.c); c2 += P_DC*P_TC) begin
    int mc = ((int'(L.m) - m2 + P_TM - 1) / P_TM); 
    int rc = ((int'(L.r) - r2 + P_TR - 1) / P_TR);
    int cc = ((int'(L.c) - c2 + P_TC - 1) / P_TC);
    if (mc > P_DM) mc = P_DM;
    if (rc > P_DR) rc = P_DR;
    if (cc > P_DC) cc = P_DC;
    n += mc*rc*cc*int'(L.z)*int'(L.k*L.k);
  end
  return n;
endfunction

task automatic run_layer(layer_cfg_t lc);
  int t0, t1, exp_mac;
  L = lc;
  make_layer();
  exp_mac = expected_mac_cycles();
  // count zero-padding positions the layer touches
  if (L.p != 0) n_pad++;
  if (int'(L.z) > P_DZ) n_reload++;
  if (L.s == 1) n_stride1++; else n_stride_gt1++;
  cfg = L;
  tick(); start <= 1'b1; tick(); start <= 1'b0;
  t0 = cycles;
  fork
    feed_layer();
    drain_layer();
    begin
      while (!done) tick();
      t1 = cycles;
    end
  join
  checks++;
  if (int'(perf.mac_cycles) != exp_mac) begin
    failures++;
    $display("MAC cycle count %0d, expected %0d", perf.mac_cycles, exp_mac);
  end
  n_buf_stall     += int'(perf.buf_stall);
  n_adapter_stall += int'(perf.adapter_stall);
  $display("layer Z=%0d M=%0d R=%0d C=%0d K=%0d S=%0d P=%0d: %0d cycles, %0d MAC cycles, buffer stalls %0d, adapter stalls %0d, MAC utilization %0d%%",
           L.z, L.m, L.r, L.c, L.k, L.s, L.p, t1 - t0, perf.mac_cycles, perf.buf_stall,
           perf.adapter_stall,
           int'(longint'(L.m*L.r*L.c) * longint'(L.z*L.k*L.k) * 100 /
                (longint'(P_TM*P_TR*P_TC) * longint'(t1 - t0))));
endtask

initial begin
  repeat (4) tick();
  rst_n = 1'b1;
  repeat (2) tick();
  for (int i = 0; i < N_LAYERS; i++) run_layer(layer_list[i]);
  // every mechanism must have happened
  checks++; if (n_buf_stall == 0)     begin failures++; $display("no buffer stall seen"); end
  checks++; if (n_adapter_stall == 0) begin failures++; $display("no adapter stall seen"); end
  checks++; if (n_pad == 0)           begin failures++; $display("no zero padding seen"); end
  checks++; if (n_reload == 0)        begin failures++; $display("no partial-sum reload seen"); end
  checks++; if (n_edge == 0)          begin failures++; $display("no partial edge tile seen"); end
  checks++; if (n_stride1 == 0 || n_stride_gt1 == 0) begin failures++; $display("no stride switch seen"); end
  checks++; if (n_out_tiles < 2)      begin failures++; $display("fewer than two output tiles"); end
  $display("mechanisms: buffer stalls %0d, adapter stalls %0d, padded layers %0d, reload layers %0d, edge outputs %0d, stride-1 layers %0d, strided layers %0d, output tiles %0d",
           n_buf_stall, n_adapter_stall, n_pad, n_reload, n_edge, n_stride1, n_stride_gt1, n_out_tiles);
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
end

initial begin
  repeat (WATCHDOG_CYCLES) @(posedge clk);
  failures++;
  $display("watchdog expired");
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
end
