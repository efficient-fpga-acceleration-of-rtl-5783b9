// mac_unit_tb: random multiply-accumulate sequences for both number formats.
// Fixed point: against a software model of the Q16.16 product (full product,
// arithmetic shift, truncation). Floating point: against double-precision
// arithmetic rounded to single precision by a separate routine (round to
// nearest-even on the 53-bit significand; a double holds the exact product
// of two singles, and rounding a sum of two singles through a double is
// exact). Both also check init (restart from init_val) and hold (en=0).
module mac_unit_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic en = 1'b0, init = 1'b0;
  logic signed [31:0] init_val = '0, a = '0, w = '0, acc, acc_f;
  int checks = 0, failures = 0;

  mac_unit dut (.clk, .rst_n, .en, .init, .init_val, .a, .w, .acc);
  mac_unit #(.FLOAT(1'b1)) dut_f (.clk, .rst_n, .en, .init, .init_val, .a, .w, .acc(acc_f));

  // single-precision bits -> real (subnormals read as zero)
  function automatic real from_f(logic [31:0] b);
    if (b[30:23] == 8'd0) return 0.0;
    return $bitstoreal({b[31], 11'(int'(b[30:23]) - 127 + 1023), b[22:0], 29'd0});
  endfunction

  // real -> single-precision bits, round to nearest-even, flush tiny to +0
  function automatic logic [31:0] to_f(real x);
    logic [63:0] q = $realtobits(x);
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

  function automatic logic [31:0] rnd_f(int lo_e, int hi_e);
    return {1'($urandom), 8'($urandom_range(lo_e, hi_e)), 23'($urandom)};
  endfunction

  initial begin
    int model = 0;
    logic [31:0] fmodel = '0, p;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      en       = ($urandom_range(0, 3) != 0);
      init     = ($urandom_range(0, 7) == 0);
      init_val = $urandom;
      a        = (i % 3 == 0) ? $urandom : int'($urandom_range(0, 1 << 20)) - (1 << 19);
      w        = (i % 5 == 0) ? $urandom : int'($urandom_range(0, 1 << 20)) - (1 << 19);
      if (en) model = (init ? int'(init_val) : model) + int'((longint'(a) * longint'(w)) >>> 16);
      @(posedge clk); #1;
      checks++;
      if (acc !== model) begin
        failures++;
        if (failures < 5) $display("fixed step %0d: acc %0d expected %0d", i, acc, model);
      end
    end
    // floating point: operands of mixed magnitudes (alignment shifts beyond
    // the significand), exact cancellations and zero operands
    rst_n = 1'b0; #1 rst_n = 1'b1;
    fmodel = '0;
    for (int i = 0; i < 4000; i++) begin
      en       = ($urandom_range(0, 3) != 0);
      init     = ($urandom_range(0, 7) == 0);
      init_val = rnd_f(100, 154);
      a        = rnd_f(110, 144);
      w        = rnd_f(110, 144);
      if (i % 41 == 0) a = 32'd0;
      p = to_f(from_f(a) * from_f(w));
      if (i % 13 == 0) begin          // make this step cancel exactly
        init = 1'b1;
        init_val = {~p[31], p[30:0]};
      end
      if (en) fmodel = to_f(from_f(init ? init_val : fmodel) + from_f(p));
      @(posedge clk); #1;
      checks++;
      if (acc_f !== fmodel) begin
        failures++;
        if (failures < 10) $display("float step %0d: acc %h expected %h (a %h w %h)", i, acc_f, fmodel, a, w);
      end
    end
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
