// ican_top_full_tb: the accelerator at its default sizes (compute tile
// 11 x 7 x 7, data tiles (16, 3, 2, 2), 32-bit words) running all five
// convolutional layers of AlexNet (one half of the two-way split network):
//   1: 3 x 224 x 224 -> 48 x 55 x 55, 11 x 11 kernel, stride 4, padding 2
//   2: 48 x 27 x 27 -> 128 x 27 x 27, 5 x 5 kernel, padding 2
//   3: 256 x 13 x 13 -> 192 x 13 x 13, 3 x 3 kernel, padding 1
//   4: 192 x 13 x 13 -> 192 x 13 x 13, 3 x 3 kernel, padding 1
//   5: 192 x 13 x 13 -> 128 x 13 x 13, 3 x 3 kernel, padding 1
// Every output pixel is compared with a direct evaluation of the loop nest,
// and the MAC-cycle count of each layer with the loop-nest trip count.
module ican_top_full_tb;
  localparam int unsigned P_DW = ican_pkg::DEF_DW, P_FRAC = ican_pkg::DEF_FRAC;
  localparam int unsigned P_TM = ican_pkg::DEF_TM, P_TR = ican_pkg::DEF_TR, P_TC = ican_pkg::DEF_TC;
  localparam int unsigned P_DZ = ican_pkg::DEF_DZ, P_DM = ican_pkg::DEF_DM;
  localparam int unsigned P_DR = ican_pkg::DEF_DR, P_DC = ican_pkg::DEF_DC;
  localparam int unsigned P_KMAX = ican_pkg::DEF_KMAX, P_SMAX = ican_pkg::DEF_SMAX;
  localparam int unsigned P_IN_DEPTH = ican_pkg::DEF_IN_DEPTH, P_W_DEPTH = ican_pkg::DEF_W_DEPTH;
  localparam int unsigned P_OUT_DEPTH = ican_pkg::DEF_OUT_DEPTH;
  localparam bit P_FLOAT = 1'b0;
  localparam int WATCHDOG_CYCLES = 4000000;
  localparam int N_LAYERS = 5;
  //                                   z     m     r    c    y     x     k     s    p
  localparam ican_pkg::layer_cfg_t layer_list [N_LAYERS] = '{
    '{16'd3,   16'd48,  16'd55, 16'd55, 16'd224, 16'd224, 16'd11, 16'd4, 16'd2},
    '{16'd48,  16'd128, 16'd27, 16'd27, 16'd27,  16'd27,  16'd5,  16'd1, 16'd2},
    '{16'd256, 16'd192, 16'd13, 16'd13, 16'd13,  16'd13,  16'd3,  16'd1, 16'd1},
    '{16'd192, 16'd192, 16'd13, 16'd13, 16'd13,  16'd13,  16'd3,  16'd1, 16'd1},
    '{16'd192, 16'd128, 16'd13, 16'd13, 16'd13,  16'd13,  16'd3,  16'd1, 16'd1}
  };

  `include "ican_top_tb_body.svh"

  ican_top dut (
    .clk, .rst_n, .start, .cfg, .busy, .done, .perf,
    .in_ready, .in_wr_en, .in_wr_addr, .in_wr_data, .in_commit,
    .w_ready, .w_wr_en, .w_wr_addr, .w_wr_data, .w_commit,
    .out_valid, .out_rd_en, .out_rd_addr, .out_rd_data, .out_release
  );
endmodule
