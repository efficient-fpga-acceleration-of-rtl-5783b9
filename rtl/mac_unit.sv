// mac_unit: one multiply-accumulate unit of the compute tile.
//
// Each cycle with en=1 the unit multiplies its input pixel a by its weight w
// and adds the product to the accumulator. With init=1 the sum restarts from
// init_val instead of the accumulator, so the partial sum of an output pixel
// is loaded from the output buffer in the same cycle as its first product
// (no extra load cycle). The accumulator is the output acc.
// Throughput one MAC per cycle, result visible the cycle after en.
//
// FLOAT=0 (default): fixed point. The full product is rescaled by FRAC
// fraction bits (arithmetic shift, truncated to DW bits) and added with
// wrap-around.
// FLOAT=1: IEEE-754 single precision (DW must be 32, FRAC is unused). The
// product is rounded to single precision, then added to the accumulator and
// rounded again, both to nearest-even, as a separate multiplier and adder
// would. Subnormal inputs and results are flushed to +0, results too large
// become infinity; infinities and NaNs as inputs are not handled.
// The document gives the function and the 32-bit fixed- and floating-point
// precisions; the Q16.16 format, truncation, wrap-around and the float
// simplifications above are this design's choices.
module mac_unit #(
  parameter int unsigned DW    = ican_pkg::DEF_DW,
  parameter int unsigned FRAC  = ican_pkg::DEF_FRAC,
  parameter bit          FLOAT = 1'b0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 init,
  input  logic signed [DW-1:0] init_val,
  input  logic signed [DW-1:0] a,
  input  logic signed [DW-1:0] w,
  output logic signed [DW-1:0] acc
);

  logic signed [DW-1:0] base;
  logic signed [DW-1:0] sum;

  assign base = init ? init_val : acc;

  if (!FLOAT) begin : g_fixed
    logic signed [2*DW-1:0] prod;
    logic signed [2*DW-1:0] prod_shifted;
    always_comb begin
      prod         = a * w;
      prod_shifted = prod >>> FRAC;
      sum          = base + prod_shifted[DW-1:0];
    end
  end else begin : g_float
    // Multiplier: 24 x 24-bit significand product, normalised and rounded.
    logic        p_s;
    logic [9:0]  p_e;          // biased exponent, signed headroom
    logic [47:0] p_m;
    logic [24:0] p_r;          // rounded significand, may carry to 2^24
    logic        p_zero;
    logic [31:0] prod;
    // Adder: operands ordered by magnitude, aligned with guard/round/sticky.
    logic [31:0] op_hi, op_lo;
    logic [7:0]  d;
    logic [26:0] mb, ms, ms_al;
    logic [27:0] s_m;
    logic [9:0]  s_e;
    logic [4:0]  lz;
    logic [24:0] s_r;
    logic        g, st;

    always_comb begin
      // ---- multiply ----
      p_s    = a[31] ^ w[31];
      p_zero = (a[30:23] == 8'd0) || (w[30:23] == 8'd0);
      p_m    = {1'b1, a[22:0]} * {1'b1, w[22:0]};
      p_e    = 10'(a[30:23]) + 10'(w[30:23]) - 10'd127;
      if (p_m[47]) begin
        p_e = p_e + 10'd1;
        g   = p_m[23];
        st  = |p_m[22:0];
        p_r = {1'b0, p_m[47:24]};
      end else begin
        g   = p_m[22];
        st  = |p_m[21:0];
        p_r = {1'b0, p_m[46:23]};
      end
      if (g && (st || p_r[0])) p_r = p_r + 25'd1;
      if (p_r[24]) begin
        p_r = p_r >> 1;
        p_e = p_e + 10'd1;
      end
      if (p_zero || p_e[9] || p_e == 10'd0) prod = 32'd0;
      else if (p_e >= 10'd255)              prod = {p_s, 8'hFF, 23'd0};
      else                                  prod = {p_s, p_e[7:0], p_r[22:0]};

      // ---- add: sum = base + prod ----
      if (base[30:0] >= prod[30:0]) begin op_hi = base; op_lo = prod; end
      else                          begin op_hi = prod; op_lo = base; end
      d     = op_hi[30:23] - op_lo[30:23];
      mb    = {1'b1, op_hi[22:0], 3'b000};
      ms    = (op_lo[30:23] == 8'd0) ? 27'd0 : {1'b1, op_lo[22:0], 3'b000};
      if (d >= 8'd27) ms_al = {26'd0, |ms};
      else            ms_al = (ms >> d) | 27'(|(ms & ~(27'h7FF_FFFF << d)));
      s_e   = 10'(op_hi[30:23]);
      if (op_hi[31] == op_lo[31]) s_m = {1'b0, mb} + {1'b0, ms_al};
      else                      s_m = {1'b0, mb} - {1'b0, ms_al};
      if (s_m[27]) begin
        s_m = {1'b0, s_m[27:2], s_m[1] | s_m[0]};
        s_e = s_e + 10'd1;
      end
      lz = 5'd27;                      // leading zeros of s_m[26:0]
      for (int i = 0; i < 27; i++)
        if (s_m[i]) lz = 5'(26 - i);
      s_m   = s_m << lz;
      s_e   = s_e - 10'(lz);
      g     = s_m[2];
      st    = s_m[1] | s_m[0];
      s_r   = {1'b0, s_m[26:3]};
      if (g && (st || s_r[0])) s_r = s_r + 25'd1;
      if (s_r[24]) begin
        s_r = s_r >> 1;
        s_e = s_e + 10'd1;
      end
      if (op_hi[30:23] == 8'd0)                    sum = 32'd0;   // both operands zero
      else if (op_lo[30:23] == 8'd0)             sum = op_hi;
      else if (s_m == 28'd0 || s_e[9] || s_e == 10'd0) sum = 32'd0;
      else if (s_e >= 10'd255)                   sum = {op_hi[31], 8'hFF, 23'd0};
      else                                       sum = {op_hi[31], s_e[7:0], s_r[22:0]};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  acc <= '0;
    else if (en) acc <= sum;
  end

endmodule
