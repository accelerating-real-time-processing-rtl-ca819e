// systolic_pe: one arithmetic unit of the systolic matrix multiplier.
//
// Following the unit described for the array: a value A arrives from the
// left and leaves to the right one cycle later (An). A value of matrix B
// arrives from below into a register whose output goes up to the next unit
// (Bn), so that B values can be shifted up a column; when LD is high the
// value in that register is copied into a second register that holds the
// multiplier operand. The unit multiplies A by the held B value, adds the
// partial sum S arriving from above and registers the result, which leaves
// downwards (Sn) one cycle later. Both floating-point operations are done
// in the one cycle. Reset clears every register to +0 (this design's
// choice).
module systolic_pe
  import mm_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  fp32_t a_in,    // A, from the left
  input  fp32_t s_in,    // S, partial sum from above
  input  fp32_t b_in,    // B, from below
  input  logic  ld,      // LD: copy the shifted B value into the held one
  output fp32_t a_out,   // An, to the right
  output fp32_t s_out,   // Sn, downwards
  output fp32_t b_out    // Bn, upwards
);
  fp32_t b_shift, b_held, prod, acc;

  fp32_mul u_mul (.a(a_in), .b(b_held), .y(prod));
  fp32_add u_add (.a(prod), .b(s_in),   .y(acc));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_out   <= FP32_ZERO;
      s_out   <= FP32_ZERO;
      b_shift <= FP32_ZERO;
      b_held  <= FP32_ZERO;
    end else begin
      a_out   <= a_in;
      s_out   <= acc;
      b_shift <= b_in;
      if (ld) b_held <= b_shift;
    end
  end

  assign b_out = b_shift;
endmodule
