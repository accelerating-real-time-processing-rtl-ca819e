// fp32_mul: combinational IEEE-754 single-precision multiplier.
//
// This is the multiplier of the kernel's dot-product unit and of each
// systolic arithmetic unit. The 24x24-bit significand product is
// normalised by at most one place and rounded to nearest, ties to even.
// Simplifications of this design: subnormal inputs are read as zero and
// results below the normal range are flushed to a signed zero; infinities
// are propagated and any NaN or 0*inf gives the canonical quiet NaN.
// No clock: the result is valid in the same cycle as the operands.
module fp32_mul
  import mm_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);
  logic        sa, sb, sy;
  logic [7:0]  ea, eb;
  logic [22:0] ma, mb;
  logic [47:0] prod;
  logic [23:0] mant;
  logic        guard, sticky, round_up;
  logic [24:0] mant_r;
  logic signed [10:0] exp_y;
  logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;

  always_comb begin
    {sa, ea, ma} = a;
    {sb, eb, mb} = b;
    sy     = sa ^ sb;
    a_zero = (ea == 8'd0);
    b_zero = (eb == 8'd0);
    a_inf  = (ea == 8'hff) && (ma == '0);
    b_inf  = (eb == 8'hff) && (mb == '0);
    a_nan  = (ea == 8'hff) && (ma != '0);
    b_nan  = (eb == 8'hff) && (mb != '0);

    prod  = {1'b1, ma} * {1'b1, mb};
    exp_y = $signed({3'b000, ea}) + $signed({3'b000, eb}) - 11'sd127;
    if (prod[47]) begin
      mant   = prod[47:24];
      guard  = prod[23];
      sticky = |prod[22:0];
      exp_y  = exp_y + 11'sd1;
    end else begin
      mant   = prod[46:23];
      guard  = prod[22];
      sticky = |prod[21:0];
    end
    round_up = guard & (sticky | mant[0]);
    mant_r   = {1'b0, mant} + {24'd0, round_up};
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      exp_y  = exp_y + 11'sd1;
    end

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero))
      y = FP32_QNAN;
    else if (a_inf || b_inf)
      y = {sy, 8'hff, 23'd0};
    else if (a_zero || b_zero)
      y = {sy, 31'd0};
    else if (exp_y >= 11'sd255)
      y = {sy, 8'hff, 23'd0};
    else if (exp_y <= 11'sd0)
      y = {sy, 31'd0};
    else
      y = {sy, exp_y[7:0], mant_r[22:0]};
  end
endmodule
