// fp32_mul: single-precision (IEEE-754 binary32) floating-point multiplier.
//
// Combinational. The 24-bit significands (hidden one restored) are
// multiplied into a 48-bit product, normalised by at most one position,
// and rounded to nearest, ties to even, using a guard bit and a sticky bit.
// The exponent is ea + eb - 127, plus one when the product carries.
//
// The design computes in single precision; the treatment of special cases
// is this implementation's own choice: subnormal inputs and results are
// flushed to a signed zero, overflow gives a signed infinity, and any NaN
// operand, or infinity times zero, gives the quiet NaN 0x7FC00000.
//
// Interface: a, b operands; y = a * b in the same cycle.
module fp32_mul
  import fsrcnn_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  logic        sa, sb, sy;
  logic [7:0]  ea, eb;
  logic [22:0] ma, mb;
  logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic [47:0] prod;
  logic [9:0]  exp_s;      // signed, room for under- and overflow
  logic [23:0] mant_r;     // 1 + 23 bits after rounding increment
  logic [22:0] frac;
  logic        guard, sticky, round_up;

  always_comb begin
    {sa, ea, ma} = a;
    {sb, eb, mb} = b;
    sy     = sa ^ sb;
    a_zero = (ea == 8'd0);
    b_zero = (eb == 8'd0);
    a_inf  = (ea == 8'hFF) && (ma == 23'd0);
    b_inf  = (eb == 8'hFF) && (mb == 23'd0);
    a_nan  = (ea == 8'hFF) && (ma != 23'd0);
    b_nan  = (eb == 8'hFF) && (mb != 23'd0);

    prod   = {1'b1, ma} * {1'b1, mb};
    exp_s  = {2'b00, ea} + {2'b00, eb} - 10'd127;
    if (prod[47]) begin
      frac   = prod[46:24];
      guard  = prod[23];
      sticky = |prod[22:0];
      exp_s  = exp_s + 10'd1;
    end else begin
      frac   = prod[45:23];
      guard  = prod[22];
      sticky = |prod[21:0];
    end
    round_up = guard && (sticky || frac[0]);
    mant_r   = {1'b0, frac} + {23'd0, round_up};
    if (mant_r[23]) begin
      // rounding carried out of the fraction: 1.111..1 + ulp = 10.000..0
      exp_s = exp_s + 10'd1;
    end

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero)) begin
      y = FP32_QNAN;
    end else if (a_inf || b_inf) begin
      y = {sy, 8'hFF, 23'd0};
    end else if (a_zero || b_zero) begin
      y = {sy, 31'd0};
    end else if (!exp_s[9] && exp_s >= 10'd255) begin
      y = {sy, 8'hFF, 23'd0};
    end else if (exp_s[9] || exp_s == 10'd0) begin
      y = {sy, 31'd0};
    end else begin
      y = {sy, exp_s[7:0], mant_r[22:0]};
    end
  end

endmodule
