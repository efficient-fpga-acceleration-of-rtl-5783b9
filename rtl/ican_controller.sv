// ican_controller: the hardware controller of the ICAN engine.
//
// It runs one convolutional layer as the tiled loop nest
//   for m2, r2, c2            (output data tile: DM*TM x DR*TR x DC*TC pixels)
//     for z2                  (input/weight data tile: DZ input maps)
//       for m1, r1, c1        (compute tile: TM x TR x TC MAC units)
//         for z1              (one input map)
//           for (y, x)        (K^2 kernel positions, serpentine order)
// with m, r, c unrolled in the compute tile. Per output tile it waits for an
// empty output-buffer bank; per input/weight tile it waits until both buffers
// hold a full bank (the stall that keeps double buffering correct), starts
// the read controller and then, for every window the read controller has
// assembled in the shape adapter: one LOAD cycle copies the adapter into the
// input reuse network, then K^2 MAC cycles follow, shifting the network
// west K-1 times, north once, east K-1 times, north once, ... and reading
// the matching weight word each cycle. On the first input map of an output
// tile the accumulators start from zero, otherwise from the partial sums read
// from the output buffer in the LOAD cycle. After the last input map of a
// compute tile the sums are written back in the next LOAD cycle (a
// simultaneous load and store), or in a final store cycle at the end of a
// data tile. The output bank is committed after the last z2 tile.
// Buffer layouts (this design's choices):
//   weight word (mi*DZ + zi)*K*K + y*K + x, lane m = map m2 + mi*TM + m
//   output word (mi*DR + ri)*DC + ci, lane (m*TR + r)*TC + c
// The loop order and tile sizes follow the document; the state machine,
// the handshakes and the per-window overhead (one LOAD cycle) are this
// design's own.
module ican_controller
  import ican_pkg::*;
#(
  parameter int unsigned TM = ican_pkg::DEF_TM,
  parameter int unsigned TR = ican_pkg::DEF_TR,
  parameter int unsigned TC = ican_pkg::DEF_TC,
  parameter int unsigned DZ = ican_pkg::DEF_DZ,
  parameter int unsigned DM = ican_pkg::DEF_DM,
  parameter int unsigned DR = ican_pkg::DEF_DR,
  parameter int unsigned DC = ican_pkg::DEF_DC,
  parameter int unsigned W_AW = 13,
  parameter int unsigned O_AW = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  layer_cfg_t         cfg,
  output logic               busy,
  output logic               done,
  output perf_t              perf,
  output layer_cfg_t         cfg_q,
  // input buffer (drain side)
  input  logic               in_valid,
  output logic               in_release,
  // weight buffer (drain side)
  input  logic               w_valid,
  output logic               w_rd_en,
  output logic [W_AW-1:0]    w_rd_addr,
  output logic               w_release,
  // output buffer (fill side)
  input  logic               o_ready,
  output logic               o_rd_en,
  output logic [O_AW-1:0]    o_rd_addr,
  output logic               o_wr_en,
  output logic [O_AW-1:0]    o_wr_addr,
  output logic               o_commit,
  // read controller
  output logic               rc_start,
  output logic [15:0]        rc_m_cnt,
  output logic [15:0]        rc_r_cnt,
  output logic [15:0]        rc_c_cnt,
  output logic [15:0]        rc_z_cnt,
  output logic signed [17:0] rc_tile_row0,
  output logic signed [17:0] rc_tile_col0,
  output logic [15:0]        rows_l,
  output logic [15:0]        cols_l,
  output logic [15:0]        rstep,
  output logic [15:0]        cstep,
  output logic [15:0]        xt,
  output logic [15:0]        wpc,
  input  logic               win_ready,
  output logic               win_take,
  // input reuse network and compute tile
  output logic               net_load,
  output shift_t             net_shift,
  output logic               mac_en,
  output logic               mac_init,
  output logic               init_zero
);

  localparam int unsigned W = TR*TC;

  typedef enum logic [2:0] {S_IDLE, S_CFG, S_OTILE, S_ZTILE, S_WWAIT, S_LOAD, S_MAC, S_TEND}
    state_t;
  state_t st;

  logic [15:0] m2, r2, c2, z2;                 // data tile origin
  logic [15:0] m_cnt, r_cnt, c_cnt, z_cnt;     // groups in the current tile
  logic [15:0] mi, ri, ci, zi;                 // current window
  logic [15:0] kk, ky, kx, kcnt;               // kernel step
  logic        pend;                           // a finished compute tile awaits its store
  logic [O_AW-1:0] pend_addr;

  // next serpentine position after (ky, kx)
  logic [15:0] ny, nx;
  always_comb begin
    ny = ky; nx = kx;
    if (!ky[0]) begin
      if (kx == cfg_q.k - 16'd1) ny = ky + 16'd1;
      else                       nx = kx + 16'd1;
    end else begin
      if (kx == 16'd0) ny = ky + 16'd1;
      else             nx = kx - 16'd1;
    end
  end

  function automatic logic [15:0] min16(input logic [15:0] a, input logic [15:0] b);
    return (a < b) ? a : b;
  endfunction

  logic [31:0] w_base;
  assign w_base = (32'(mi) * 32'(DZ) + 32'(zi)) * 32'(kk);

  logic last_step, last_z1, last_window;
  assign last_step   = (kcnt == kk - 16'd1);
  assign last_z1     = (zi == z_cnt - 16'd1);
  assign last_window = last_z1 && (ci == c_cnt - 16'd1) && (ri == r_cnt - 16'd1) &&
                       (mi == m_cnt - 16'd1);

  logic [O_AW-1:0] o_addr_cur;
  assign o_addr_cur = O_AW'((32'(mi) * 32'(DR) + 32'(ri)) * 32'(DC) + 32'(ci));

  // Combinational outputs that depend on the state
  always_comb begin
    win_take  = (st == S_LOAD);
    net_load  = (st == S_LOAD);
    mac_en    = (st == S_MAC);
    mac_init  = (st == S_MAC) && (kcnt == 16'd0) && (zi == 16'd0);
    init_zero = (z2 == 16'd0);
    net_shift = SHIFT_NONE;
    if (st == S_MAC && !last_step) begin
      if (ny != ky)     net_shift = SHIFT_NORTH;
      else if (nx > kx) net_shift = SHIFT_WEST;
      else              net_shift = SHIFT_EAST;
    end
    w_rd_en   = (st == S_LOAD) || (st == S_MAC && !last_step);
    if (st == S_LOAD) w_rd_addr = W_AW'(w_base);
    else              w_rd_addr = W_AW'(w_base + 32'(ny) * 32'(cfg_q.k) + 32'(nx));
    o_rd_en   = (st == S_LOAD) && (zi == 16'd0) && (z2 != 16'd0);
    o_rd_addr = o_addr_cur;
    o_wr_en   = ((st == S_LOAD) || (st == S_TEND)) && pend;
    o_wr_addr = pend_addr;
    in_release = (st == S_TEND);
    w_release  = (st == S_TEND);
    o_commit   = (st == S_TEND) && (32'(z2) + 32'(DZ) >= 32'(cfg_q.z));
  end

  assign busy = (st != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE;
      cfg_q <= '0;
      {m2, r2, c2, z2, m_cnt, r_cnt, c_cnt, z_cnt, mi, ri, ci, zi, kk, ky, kx, kcnt} <= '0;
      {rows_l, cols_l, rstep, cstep, xt, wpc} <= '0;
      pend <= 1'b0; pend_addr <= '0;
      done <= 1'b0; perf <= '0;
      rc_start <= 1'b0;
      {rc_m_cnt, rc_r_cnt, rc_c_cnt, rc_z_cnt} <= '0;
      rc_tile_row0 <= '0; rc_tile_col0 <= '0;
    end else begin
      done     <= 1'b0;
      rc_start <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          cfg_q <= cfg;
          perf  <= '0;
          st    <= S_CFG;
        end
        S_CFG: begin
          rows_l <= 16'(TR-1) * cfg_q.s + cfg_q.k;
          cols_l <= 16'(TC-1) * cfg_q.s + cfg_q.k;
          rstep  <= 16'(TR) * cfg_q.s;
          cstep  <= 16'(TC) * cfg_q.s;
          xt     <= cfg_q.s * 16'(DC*TC-1) + cfg_q.k;
          wpc    <= (cfg_q.s * 16'(DR*TR-1) + cfg_q.k + 16'(W-1)) / 16'(W);
          kk     <= cfg_q.k * cfg_q.k;
          {m2, r2, c2, z2} <= '0;
          st     <= S_OTILE;
        end
        S_OTILE: begin
          if (o_ready) begin
            z2 <= '0;
            m_cnt <= min16(16'(DM), (cfg_q.m - m2 + 16'(TM-1)) / 16'(TM));
            r_cnt <= min16(16'(DR), (cfg_q.r - r2 + 16'(TR-1)) / 16'(TR));
            c_cnt <= min16(16'(DC), (cfg_q.c - c2 + 16'(TC-1)) / 16'(TC));
            st <= S_ZTILE;
          end else begin
            perf.buf_stall <= perf.buf_stall + 32'd1;
          end
        end
        S_ZTILE: begin
          if (in_valid && w_valid && !rc_start) begin
            z_cnt        <= min16(16'(DZ), cfg_q.z - z2);
            rc_start     <= 1'b1;
            rc_m_cnt     <= m_cnt;
            rc_r_cnt     <= r_cnt;
            rc_c_cnt     <= c_cnt;
            rc_z_cnt     <= min16(16'(DZ), cfg_q.z - z2);
            rc_tile_row0 <= $signed({2'b00, r2 * cfg_q.s}) - $signed({2'b00, cfg_q.p});
            rc_tile_col0 <= $signed({2'b00, c2 * cfg_q.s}) - $signed({2'b00, cfg_q.p});
            {mi, ri, ci, zi} <= '0;
            st <= S_WWAIT;
          end else begin
            perf.buf_stall <= perf.buf_stall + 32'd1;
          end
        end
        S_WWAIT: begin
          if (win_ready) st <= S_LOAD;
          else perf.adapter_stall <= perf.adapter_stall + 32'd1;
        end
        S_LOAD: begin
          if (pend) pend <= 1'b0;
          ky <= '0; kx <= '0; kcnt <= '0;
          st <= S_MAC;
        end
        S_MAC: begin
          perf.mac_cycles <= perf.mac_cycles + 32'd1;
          ky <= ny; kx <= nx;
          kcnt <= kcnt + 16'd1;
          if (last_step) begin
            if (last_z1) begin
              pend      <= 1'b1;
              pend_addr <= o_addr_cur;
            end
            if (last_window) begin
              st <= S_TEND;
            end else begin
              st <= S_WWAIT;
              if (!last_z1) zi <= zi + 16'd1;
              else begin
                zi <= '0;
                if (ci + 16'd1 < c_cnt) ci <= ci + 16'd1;
                else begin
                  ci <= '0;
                  if (ri + 16'd1 < r_cnt) ri <= ri + 16'd1;
                  else begin
                    ri <= '0;
                    mi <= mi + 16'd1;
                  end
                end
              end
            end
          end
        end
        S_TEND: begin
          pend <= 1'b0;
          perf.tiles <= perf.tiles + 32'd1;
          if (32'(z2) + 32'(DZ) < 32'(cfg_q.z)) begin
            z2 <= z2 + 16'(DZ);
            st <= S_ZTILE;
          end else if (32'(c2) + 32'(DC*TC) < 32'(cfg_q.c)) begin
            c2 <= c2 + 16'(DC*TC);
            st <= S_OTILE;
          end else if (32'(r2) + 32'(DR*TR) < 32'(cfg_q.r)) begin
            c2 <= '0;
            r2 <= r2 + 16'(DR*TR);
            st <= S_OTILE;
          end else if (32'(m2) + 32'(DM*TM) < 32'(cfg_q.m)) begin
            c2 <= '0;
            r2 <= '0;
            m2 <= m2 + 16'(DM*TM);
            st <= S_OTILE;
          end else begin
            done <= 1'b1;
            st   <= S_IDLE;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
