// fp32_add: combinational IEEE-754 single-precision adder.
//
// This is the adder of the kernel's adder tree and accumulator and of each
// systolic arithmetic unit. The operand of smaller magnitude is aligned to
// the larger one with three extra bits (guard, round, sticky); the sum or
// difference is normalised and rounded to nearest, ties to even. An exact
// zero difference gives +0. Simplifications of this design: subnormal
// inputs are read as zero and results below the normal range are flushed
// to a signed zero; inf - inf and any NaN give the canonical quiet NaN.
// No clock: the result is valid in the same cycle as the operands.
module fp32_add
  import mm_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);
  fp32_t       op_hi, op_lo;
  logic        sbig, ssml;
  logic [7:0]  ebig, esml;
  logic [7:0]  d;
  logic [26:0] xbig, xsml, xsh;
  logic        sh_sticky;
  logic [27:0] sum;
  logic [26:0] x;
  logic [4:0]  lz;
  logic        found;
  logic signed [10:0] exp_y;
  logic [23:0] m24;
  logic        round_up;
  logic [24:0] mant_r;
  logic        a_inf, b_inf, a_nan, b_nan;

  always_comb begin
    // Flush subnormal inputs to signed zero.
    fp32_t fa, fb;
    fa = (a[30:23] == 8'd0) ? {a[31], 31'd0} : a;
    fb = (b[30:23] == 8'd0) ? {b[31], 31'd0} : b;
    a_inf = (fa[30:23] == 8'hff) && (fa[22:0] == '0);
    b_inf = (fb[30:23] == 8'hff) && (fb[22:0] == '0);
    a_nan = (fa[30:23] == 8'hff) && (fa[22:0] != '0);
    b_nan = (fb[30:23] == 8'hff) && (fb[22:0] != '0);

    if (fa[30:0] >= fb[30:0]) begin
      op_hi = fa; op_lo = fb;
    end else begin
      op_hi = fb; op_lo = fa;
    end
    {sbig, ebig} = {op_hi[31], op_hi[30:23]};
    {ssml, esml} = {op_lo[31], op_lo[30:23]};
    xbig = (ebig == 8'd0) ? 27'd0 : {1'b1, op_hi[22:0], 3'b000};
    xsml = (esml == 8'd0) ? 27'd0 : {1'b1, op_lo[22:0], 3'b000};
    d    = ebig - esml;

    // Align the smaller operand, folding shifted-out bits into sticky.
    if (d >= 8'd27) begin
      xsh       = 27'd0;
      sh_sticky = (xsml != 27'd0);
    end else begin
      xsh       = xsml >> d;
      sh_sticky = ((xsml & ((27'd1 << d) - 27'd1)) != 27'd0);
    end
    xsh[0] = xsh[0] | sh_sticky;

    exp_y = $signed({3'b000, ebig});
    lz    = '0;
    found = 1'b0;
    if (sbig == ssml) begin
      sum = {1'b0, xbig} + {1'b0, xsh};
      if (sum[27]) begin
        x     = {sum[27:2], sum[1] | sum[0]};
        exp_y = exp_y + 11'sd1;
      end else begin
        x = sum[26:0];
      end
    end else begin
      sum = {1'b0, xbig} - {1'b0, xsh};
      for (int i = 26; i >= 0; i--) begin
        if (!found && sum[i]) begin
          found = 1'b1;
          lz    = 5'(26 - i);
        end
      end
      x     = sum[26:0] << lz;
      exp_y = exp_y - $signed({6'd0, lz});
    end

    m24      = x[26:3];
    round_up = x[2] & ((|x[1:0]) | m24[0]);
    mant_r   = {1'b0, m24} + {24'd0, round_up};
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      exp_y  = exp_y + 11'sd1;
    end

    if (a_nan || b_nan || (a_inf && b_inf && (fa[31] != fb[31])))
      y = FP32_QNAN;
    else if (a_inf)
      y = fa;
    else if (b_inf)
      y = fb;
    else if (xbig == 27'd0)                 // both operands zero
      y = {fa[31] & fb[31], 31'd0};
    else if (sum[26:0] == 27'd0 && sum[27] == 1'b0)   // exact cancellation
      y = FP32_ZERO;
    else if (exp_y >= 11'sd255)
      y = {sbig, 8'hff, 23'd0};
    else if (exp_y <= 11'sd0)
      y = {sbig, 31'd0};
    else
      y = {sbig, exp_y[7:0], mant_r[22:0]};
  end
endmodule
