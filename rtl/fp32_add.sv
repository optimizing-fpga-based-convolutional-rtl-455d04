// fp32_add: single-precision (IEEE-754 binary32) floating-point adder.
//
// Combinational. The operand of larger magnitude is placed first; the
// smaller significand is shifted right by the exponent difference into a
// 27-bit field (hidden bit, 23 fraction bits, guard, round, sticky). The two
// are added or subtracted, the result is normalised (one right shift on a
// carry, or a left shift by the leading-zero count after cancellation) and
// rounded to nearest, ties to even.
//
// The design computes in single precision; the treatment of special cases
// is this implementation's own choice: subnormal inputs and results are
// flushed to a signed zero, an exact cancellation gives +0, overflow gives a
// signed infinity, and any NaN operand, or inf - inf, gives the quiet NaN
// 0x7FC00000.
//
// Interface: a, b operands; y = a + b in the same cycle.
module fp32_add
  import fsrcnn_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  logic        sa, sb, s_big, s_sml;
  logic [7:0]  ea, eb, e_big, e_sml;
  logic [22:0] ma, mb, m_big, m_sml;
  logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic [7:0]  diff;
  logic [26:0] big27, sml27;
  logic [53:0] shifted;
  logic [27:0] sum;
  logic [26:0] norm;
  logic [4:0]  lz;
  logic [9:0]  exp_s;
  logic [23:0] mant_r;
  logic        round_up;

  always_comb begin
    {sa, ea, ma} = a;
    {sb, eb, mb} = b;
    a_zero = (ea == 8'd0);
    b_zero = (eb == 8'd0);
    a_inf  = (ea == 8'hFF) && (ma == 23'd0);
    b_inf  = (eb == 8'hFF) && (mb == 23'd0);
    a_nan  = (ea == 8'hFF) && (ma != 23'd0);
    b_nan  = (eb == 8'hFF) && (mb != 23'd0);

    // order by magnitude
    if ({ea, ma} >= {eb, mb}) begin
      {s_big, e_big, m_big} = {sa, ea, ma};
      {s_sml, e_sml, m_sml} = {sb, eb, mb};
    end else begin
      {s_big, e_big, m_big} = {sb, eb, mb};
      {s_sml, e_sml, m_sml} = {sa, ea, ma};
    end
    diff  = e_big - e_sml;
    big27 = {1'b1, m_big, 3'b000};
    // align the smaller operand; bits shifted out collapse into the sticky bit
    shifted = {1'b1, m_sml, 3'b000, 27'd0} >> ((diff > 8'd27) ? 8'd28 : diff);
    sml27   = {shifted[53:28], shifted[27] | (|shifted[26:0])};

    if (s_big == s_sml) sum = {1'b0, big27} + {1'b0, sml27};
    else                sum = {1'b0, big27} - {1'b0, sml27};

    // normalise
    exp_s = {2'b00, e_big};
    lz    = 5'd0;
    if (sum[27]) begin
      norm  = {sum[27:2], sum[1] | sum[0]};
      exp_s = exp_s + 10'd1;
    end else begin
      for (int i = 26; i >= 0; i--) begin
        if (sum[i]) begin
          lz = 5'(26 - i);
          break;
        end
      end
      norm  = sum[26:0] << lz;
      exp_s = exp_s - {5'd0, lz};
    end

    round_up = norm[2] && (norm[1] || norm[0] || norm[3]);
    mant_r   = {1'b0, norm[25:3]} + {23'd0, round_up};
    if (mant_r[23]) exp_s = exp_s + 10'd1;

    if (a_nan || b_nan || (a_inf && b_inf && (sa != sb))) begin
      y = FP32_QNAN;
    end else if (a_inf) begin
      y = {sa, 8'hFF, 23'd0};
    end else if (b_inf) begin
      y = {sb, 8'hFF, 23'd0};
    end else if (a_zero && b_zero) begin
      y = {sa & sb, 31'd0};
    end else if (b_zero) begin
      y = a;
    end else if (a_zero) begin
      y = b;
    end else if (sum == 28'd0) begin
      y = FP32_ZERO;
    end else if (!exp_s[9] && exp_s >= 10'd255) begin
      y = {s_big, 8'hFF, 23'd0};
    end else if (exp_s[9] || exp_s == 10'd0) begin
      y = {s_big, 31'd0};
    end else begin
      y = {s_big, exp_s[7:0], mant_r[22:0]};
    end
  end

endmodule
