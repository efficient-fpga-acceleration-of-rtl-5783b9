// ican: the Input-recycling Convolutional Array of Neurons, the computation
// engine of the accelerator.
//
// Datapath: input buffer -> shape adapter -> input reuse network -> 3D
// compute tile (TM x TR x TC MAC units) -> output buffer, with the weight
// buffer feeding TM weights per cycle to the compute tile. The read
// controller fills the shape adapter one window ahead of the compute tile;
// the hardware controller sequences the tiled loop nest, the serpentine
// shifts of the reuse network, the MAC enables and the buffer handshakes.
// Per window of K^2 MAC cycles the engine spends one extra cycle (the
// network load) plus any cycles the shape adapter is late; in steady state a
// layer takes about Z*ceil(M/TM)*ceil(R/TR)*ceil(C/TC)*(K^2+1) cycles.
// Interface: the drain sides of the input and weight double buffers and the
// fill side of the output double buffer (read latency one cycle on all),
// a start pulse with the layer description, done pulse and busy.
// Structure follows the document; interfaces and timing are this design's.
module ican
  import ican_pkg::*;
#(
  parameter int unsigned DW        = ican_pkg::DEF_DW,
  parameter int unsigned FRAC      = ican_pkg::DEF_FRAC,
  parameter bit          FLOAT     = 1'b0,   // 1: single-precision float MACs
  parameter int unsigned TM        = ican_pkg::DEF_TM,
  parameter int unsigned TR        = ican_pkg::DEF_TR,
  parameter int unsigned TC        = ican_pkg::DEF_TC,
  parameter int unsigned DZ        = ican_pkg::DEF_DZ,
  parameter int unsigned DM        = ican_pkg::DEF_DM,
  parameter int unsigned DR        = ican_pkg::DEF_DR,
  parameter int unsigned DC        = ican_pkg::DEF_DC,
  parameter int unsigned KMAX      = ican_pkg::DEF_KMAX,
  parameter int unsigned SMAX      = ican_pkg::DEF_SMAX,
  parameter int unsigned IN_DEPTH  = ican_pkg::DEF_IN_DEPTH,
  parameter int unsigned W_DEPTH   = ican_pkg::DEF_W_DEPTH,
  parameter int unsigned OUT_DEPTH = ican_pkg::DEF_OUT_DEPTH,
  parameter int unsigned IN_AW     = (IN_DEPTH  > 1) ? $clog2(IN_DEPTH)  : 1,
  parameter int unsigned W_AW      = (W_DEPTH   > 1) ? $clog2(W_DEPTH)   : 1,
  parameter int unsigned O_AW      = (OUT_DEPTH > 1) ? $clog2(OUT_DEPTH) : 1
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               start,
  input  layer_cfg_t                         cfg,
  output logic                               busy,
  output logic                               done,
  output perf_t                              perf,
  // input buffer, drain side
  input  logic                               in_valid,
  output logic                               in_rd_en,
  output logic [IN_AW-1:0]                   in_rd_addr,
  input  logic [TR*TC*DW-1:0]                in_rd_data,
  output logic                               in_release,
  // weight buffer, drain side
  input  logic                               w_valid,
  output logic                               w_rd_en,
  output logic [W_AW-1:0]                    w_rd_addr,
  input  logic [TM*DW-1:0]                   w_rd_data,
  output logic                               w_release,
  // output buffer, fill side
  input  logic                               o_ready,
  output logic                               o_rd_en,
  output logic [O_AW-1:0]                    o_rd_addr,
  input  logic [TM*TR*TC*DW-1:0]             o_rd_data,
  output logic                               o_wr_en,
  output logic [O_AW-1:0]                    o_wr_addr,
  output logic [TM*TR*TC*DW-1:0]             o_wr_data,
  output logic                               o_commit
);

  localparam int unsigned ROWS = (TR-1)*SMAX + KMAX;
  localparam int unsigned COLS = (TC-1)*SMAX + KMAX;

  layer_cfg_t cfg_q;

  // controller <-> read controller
  logic               rc_start, win_ready, win_take, rc_busy;
  logic [15:0]        rc_m_cnt, rc_r_cnt, rc_c_cnt, rc_z_cnt;
  logic signed [17:0] rc_tile_row0, rc_tile_col0;
  logic [15:0]        rows_l, cols_l, rstep, cstep, xt, wpc;

  // shape adapter control
  logic               ad_wr_en;
  logic [15:0]        ad_col;
  logic signed [17:0] ad_row_off, ad_img_row0, ad_img_col;
  logic [ROWS-1:0][COLS-1:0][DW-1:0] ad_cells;

  // reuse network and compute tile
  logic                               net_load, mac_en, mac_init, init_zero;
  shift_t                             net_shift;
  logic [TR-1:0][TC-1:0][DW-1:0]       taps;
  logic [TM-1:0][TR-1:0][TC-1:0][DW-1:0] acc, init_val;

  ican_controller #(
    .TM(TM), .TR(TR), .TC(TC), .DZ(DZ), .DM(DM), .DR(DR), .DC(DC),
    .W_AW(W_AW), .O_AW(O_AW)
  ) u_ctrl (
    .clk, .rst_n, .start, .cfg, .busy, .done, .perf, .cfg_q,
    .in_valid, .in_release,
    .w_valid, .w_rd_en, .w_rd_addr, .w_release,
    .o_ready, .o_rd_en, .o_rd_addr, .o_wr_en, .o_wr_addr, .o_commit,
    .rc_start, .rc_m_cnt, .rc_r_cnt, .rc_c_cnt, .rc_z_cnt, .rc_tile_row0, .rc_tile_col0,
    .rows_l, .cols_l, .rstep, .cstep, .xt, .wpc,
    .win_ready, .win_take,
    .net_load, .net_shift, .mac_en, .mac_init, .init_zero
  );

  read_controller #(.TR(TR), .TC(TC), .AW(IN_AW)) u_rdc (
    .clk, .rst_n,
    .start(rc_start), .m_cnt(rc_m_cnt), .r_cnt(rc_r_cnt), .c_cnt(rc_c_cnt), .z_cnt(rc_z_cnt),
    .tile_row0(rc_tile_row0), .tile_col0(rc_tile_col0),
    .rows_l, .cols_l, .rstep, .cstep, .xt, .wpc,
    .ibuf_rd_en(in_rd_en), .ibuf_rd_addr(in_rd_addr),
    .ad_wr_en, .ad_col, .ad_row_off, .ad_img_row0, .ad_img_col,
    .win_ready, .win_take, .busy(rc_busy)
  );

  shape_adapter #(.DW(DW), .TR(TR), .TC(TC), .KMAX(KMAX), .SMAX(SMAX)) u_adapter (
    .clk, .rst_n,
    .wr_en(ad_wr_en), .col(ad_col), .word(in_rd_data),
    .row_off(ad_row_off), .img_row0(ad_img_row0), .img_col(ad_img_col),
    .img_y(cfg_q.y), .img_x(cfg_q.x),
    .cells(ad_cells)
  );

  input_reuse_network #(.DW(DW), .TR(TR), .TC(TC), .KMAX(KMAX), .SMAX(SMAX)) u_net (
    .clk, .rst_n,
    .load(net_load), .load_data(ad_cells), .shift(net_shift), .stride(cfg_q.s),
    .taps
  );

  assign init_val = init_zero ? '0 : o_rd_data;

  compute_tile #(.DW(DW), .FRAC(FRAC), .FLOAT(FLOAT), .TM(TM), .TR(TR), .TC(TC)) u_tile (
    .clk, .rst_n,
    .en(mac_en), .init(mac_init),
    .a(taps), .w(w_rd_data), .init_val,
    .acc
  );

  assign o_wr_data = acc;

  // The engine only reads a buffer bank it owns
  a_in_owned: assert property (@(posedge clk) disable iff (!rst_n) in_rd_en |-> in_valid);
  a_w_owned:  assert property (@(posedge clk) disable iff (!rst_n) w_rd_en  |-> w_valid);
  a_o_owned:  assert property (@(posedge clk) disable iff (!rst_n) (o_rd_en || o_wr_en) |-> o_ready);

endmodule
