// ican_top: the convolutional-layer accelerator.
//
// The ICAN computation engine with its three double-buffered on-chip
// buffers: input (TR*TC words wide), weight (TM words wide) and output
// (TM*TR*TC words wide). The bus side of each buffer is brought out as ports;
// in a system the memory controller's DMA fills the input and weight banks
// with the data tiles of the loop nest, in the order the engine consumes them
// (m2, r2, c2, then z2), and drains each finished output tile. Filling and
// draining one bank overlaps with computation on the other; the engine
// stalls when a bank it needs is not ready.
// Bus-side protocol per buffer: write (or read) words of the owned bank, then
// pulse *_commit (input, weight) or *_release (output). Read latency one cycle.
// One layer is started with a start pulse and cfg; done pulses at the end.
module ican_top
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
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  layer_cfg_t                cfg,
  output logic                      busy,
  output logic                      done,
  output perf_t                     perf,
  // input buffer, bus side
  output logic                      in_ready,
  input  logic                      in_wr_en,
  input  logic [IN_AW-1:0]          in_wr_addr,
  input  logic [TR*TC*DW-1:0]       in_wr_data,
  input  logic                      in_commit,
  // weight buffer, bus side
  output logic                      w_ready,
  input  logic                      w_wr_en,
  input  logic [W_AW-1:0]           w_wr_addr,
  input  logic [TM*DW-1:0]          w_wr_data,
  input  logic                      w_commit,
  // output buffer, bus side
  output logic                      out_valid,
  input  logic                      out_rd_en,
  input  logic [O_AW-1:0]           out_rd_addr,
  output logic [TM*TR*TC*DW-1:0]    out_rd_data,
  input  logic                      out_release
);

  logic                    in_valid, in_rd_en, in_release;
  logic [IN_AW-1:0]        in_rd_addr;
  logic [TR*TC*DW-1:0]     in_rd_data;
  logic                    w_valid, w_rd_en, w_release;
  logic [W_AW-1:0]         w_rd_addr;
  logic [TM*DW-1:0]        w_rd_data;
  logic                    o_ready, o_rd_en, o_wr_en, o_commit;
  logic [O_AW-1:0]         o_rd_addr, o_wr_addr;
  logic [TM*TR*TC*DW-1:0]  o_rd_data, o_wr_data;

  ican #(
    .DW(DW), .FRAC(FRAC), .FLOAT(FLOAT), .TM(TM), .TR(TR), .TC(TC), .DZ(DZ), .DM(DM), .DR(DR), .DC(DC),
    .KMAX(KMAX), .SMAX(SMAX), .IN_DEPTH(IN_DEPTH), .W_DEPTH(W_DEPTH), .OUT_DEPTH(OUT_DEPTH)
  ) u_ican (
    .clk, .rst_n, .start, .cfg, .busy, .done, .perf,
    .in_valid, .in_rd_en, .in_rd_addr, .in_rd_data, .in_release,
    .w_valid, .w_rd_en, .w_rd_addr, .w_rd_data, .w_release,
    .o_ready, .o_rd_en, .o_rd_addr, .o_rd_data, .o_wr_en, .o_wr_addr, .o_wr_data, .o_commit
  );

  double_buffer #(.WIDTH(TR*TC*DW), .DEPTH(IN_DEPTH)) u_in_buf (
    .clk, .rst_n,
    .fill_ready(in_ready), .fill_wr_en(in_wr_en), .fill_wr_addr(in_wr_addr),
    .fill_wr_data(in_wr_data), .fill_rd_en(1'b0), .fill_rd_addr('0), .fill_rd_data(),
    .fill_commit(in_commit),
    .drain_valid(in_valid), .drain_rd_en(in_rd_en), .drain_rd_addr(in_rd_addr),
    .drain_rd_data(in_rd_data), .drain_release(in_release)
  );

  double_buffer #(.WIDTH(TM*DW), .DEPTH(W_DEPTH)) u_w_buf (
    .clk, .rst_n,
    .fill_ready(w_ready), .fill_wr_en(w_wr_en), .fill_wr_addr(w_wr_addr),
    .fill_wr_data(w_wr_data), .fill_rd_en(1'b0), .fill_rd_addr('0), .fill_rd_data(),
    .fill_commit(w_commit),
    .drain_valid(w_valid), .drain_rd_en(w_rd_en), .drain_rd_addr(w_rd_addr),
    .drain_rd_data(w_rd_data), .drain_release(w_release)
  );

  double_buffer #(.WIDTH(TM*TR*TC*DW), .DEPTH(OUT_DEPTH)) u_out_buf (
    .clk, .rst_n,
    .fill_ready(o_ready), .fill_wr_en(o_wr_en), .fill_wr_addr(o_wr_addr),
    .fill_wr_data(o_wr_data), .fill_rd_en(o_rd_en), .fill_rd_addr(o_rd_addr),
    .fill_rd_data(o_rd_data), .fill_commit(o_commit),
    .drain_valid(out_valid), .drain_rd_en(out_rd_en), .drain_rd_addr(out_rd_addr),
    .drain_rd_data(out_rd_data), .drain_release(out_release)
  );

endmodule
