// ican_tb: the ICAN computation engine alone, with its three buffers
// modelled by double_buffer instances, at reduced sizes (compute tile
// 3 x 2 x 2, data tiles (3, 1, 2, 2), kernels up to 5, strides up to 2). Two
// layers: a 5 x 5 kernel with padding 2, and a stride-2 3 x 3 layer. Results
// are compared with a direct evaluation of the convolution loop nest and the
// MAC cycle count with the loop-nest trip count.
module ican_tb;
  localparam int unsigned P_DW = 32, P_FRAC = 16;
  localparam int unsigned P_TM = 3, P_TR = 2, P_TC = 2;
  localparam int unsigned P_DZ = 3, P_DM = 1, P_DR = 2, P_DC = 2;
  localparam int unsigned P_KMAX = 5, P_SMAX = 2;
  localparam int unsigned P_IN_DEPTH = 256, P_W_DEPTH = 128, P_OUT_DEPTH = 4;
  localparam bit P_FLOAT = 1'b0;
  localparam int WATCHDOG_CYCLES = 400000;
  localparam int N_LAYERS = 2;
  //                                   z  m   r   c   y   x   k  s  p
  localparam ican_pkg::layer_cfg_t layer_list [N_LAYERS] = '{
    '{16'd4, 16'd4, 16'd6, 16'd5, 16'd6, 16'd5, 16'd5, 16'd1, 16'd2},
    '{16'd2, 16'd3, 16'd3, 16'd4, 16'd7, 16'd9, 16'd3, 16'd2, 16'd0}
  };

  `include "ican_top_tb_body.svh"

  localparam int unsigned IAW = P_IN_AW, WAW = P_W_AW, OAW = P_O_AW;
  logic                 in_valid, in_rd_en, in_release;
  logic [IAW-1:0]       in_rd_addr;
  logic [P_W*P_DW-1:0]  in_rd_data;
  logic                 w_valid, w_rd_en, w_release;
  logic [WAW-1:0]       w_rd_addr;
  logic [P_TM*P_DW-1:0] w_rd_data;
  logic                 o_ready, o_rd_en, o_wr_en, o_commit;
  logic [OAW-1:0]       o_rd_addr, o_wr_addr;
  logic [P_TM*P_W*P_DW-1:0] o_rd_data, o_wr_data;

  ican #(
    .DW(P_DW), .FRAC(P_FRAC), .TM(P_TM), .TR(P_TR), .TC(P_TC),
    .DZ(P_DZ), .DM(P_DM), .DR(P_DR), .DC(P_DC), .KMAX(P_KMAX), .SMAX(P_SMAX),
    .IN_DEPTH(P_IN_DEPTH), .W_DEPTH(P_W_DEPTH), .OUT_DEPTH(P_OUT_DEPTH)
  ) dut (
    .clk, .rst_n, .start, .cfg, .busy, .done, .perf,
    .in_valid, .in_rd_en, .in_rd_addr, .in_rd_data, .in_release,
    .w_valid, .w_rd_en, .w_rd_addr, .w_rd_data, .w_release,
    .o_ready, .o_rd_en, .o_rd_addr, .o_rd_data, .o_wr_en, .o_wr_addr, .o_wr_data, .o_commit
  );

  double_buffer #(.WIDTH(P_W*P_DW), .DEPTH(P_IN_DEPTH)) u_in (
    .clk, .rst_n, .fill_ready(in_ready), .fill_wr_en(in_wr_en), .fill_wr_addr(in_wr_addr),
    .fill_wr_data(in_wr_data), .fill_rd_en(1'b0), .fill_rd_addr('0), .fill_rd_data(),
    .fill_commit(in_commit), .drain_valid(in_valid), .drain_rd_en(in_rd_en),
    .drain_rd_addr(in_rd_addr), .drain_rd_data(in_rd_data), .drain_release(in_release));
  double_buffer #(.WIDTH(P_TM*P_DW), .DEPTH(P_W_DEPTH)) u_w (
    .clk, .rst_n, .fill_ready(w_ready), .fill_wr_en(w_wr_en), .fill_wr_addr(w_wr_addr),
    .fill_wr_data(w_wr_data), .fill_rd_en(1'b0), .fill_rd_addr('0), .fill_rd_data(),
    .fill_commit(w_commit), .drain_valid(w_valid), .drain_rd_en(w_rd_en),
    .drain_rd_addr(w_rd_addr), .drain_rd_data(w_rd_data), .drain_release(w_release));
  double_buffer #(.WIDTH(P_TM*P_W*P_DW), .DEPTH(P_OUT_DEPTH)) u_out (
    .clk, .rst_n, .fill_ready(o_ready), .fill_wr_en(o_wr_en), .fill_wr_addr(o_wr_addr),
    .fill_wr_data(o_wr_data), .fill_rd_en(o_rd_en), .fill_rd_addr(o_rd_addr),
    .fill_rd_data(o_rd_data), .fill_commit(o_commit), .drain_valid(out_valid),
    .drain_rd_en(out_rd_en), .drain_rd_addr(out_rd_addr), .drain_rd_data(out_rd_data),
    .drain_release(out_release));
endmodule
