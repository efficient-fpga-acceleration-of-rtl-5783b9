// ican_top_float_tb: the end-to-end test of ican_top_tb with single-precision
// floating-point MAC units (FLOAT = 1). Same reduced sizes and the same three
// layers (padding, stride 2, partial tiles, several input-map tiles); every
// output pixel is compared bit for bit with a reference that rounds each
// product and each sum to single precision in the engine's order.
module ican_top_float_tb;
  localparam int unsigned P_DW = 32, P_FRAC = 16;
  localparam int unsigned P_TM = 2, P_TR = 2, P_TC = 3;
  localparam int unsigned P_DZ = 2, P_DM = 2, P_DR = 2, P_DC = 2;
  localparam int unsigned P_KMAX = 3, P_SMAX = 2;
  localparam int unsigned P_IN_DEPTH = 64, P_W_DEPTH = 64, P_OUT_DEPTH = 8;
  localparam bit P_FLOAT = 1'b1;
  localparam int WATCHDOG_CYCLES = 400000;
  localparam int N_LAYERS = 3;
  //                                   z  m   r   c   y   x   k  s  p
  localparam ican_pkg::layer_cfg_t layer_list [N_LAYERS] = '{
    '{16'd5, 16'd6, 16'd8, 16'd12, 16'd8, 16'd12, 16'd3, 16'd1, 16'd1},
    '{16'd3, 16'd4, 16'd4, 16'd6,  16'd9, 16'd13, 16'd3, 16'd2, 16'd0},
    '{16'd3, 16'd5, 16'd5, 16'd7,  16'd7, 16'd9,  16'd3, 16'd1, 16'd0}
  };

  `include "ican_top_tb_body.svh"

  // hard stop in simulated time, in case the clock itself stops
  initial begin
    #(64'd100_000_000);
    $display("simulation time limit reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  ican_top #(
    .DW(P_DW), .FRAC(P_FRAC), .FLOAT(P_FLOAT), .TM(P_TM), .TR(P_TR), .TC(P_TC),
    .DZ(P_DZ), .DM(P_DM), .DR(P_DR), .DC(P_DC), .KMAX(P_KMAX), .SMAX(P_SMAX),
    .IN_DEPTH(P_IN_DEPTH), .W_DEPTH(P_W_DEPTH), .OUT_DEPTH(P_OUT_DEPTH)
  ) dut (
    .clk, .rst_n, .start, .cfg, .busy, .done, .perf,
    .in_ready, .in_wr_en, .in_wr_addr, .in_wr_data, .in_commit,
    .w_ready, .w_wr_en, .w_wr_addr, .w_wr_data, .w_commit,
    .out_valid, .out_rd_en, .out_rd_addr, .out_rd_data, .out_release
  );
endmodule
