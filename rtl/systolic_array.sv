// systolic_array: ROWS x COLS grid of systolic arithmetic units.
//
// Unit (r,c) passes A to unit (r,c+1), its partial sum down to unit (r+1,c)
// and its shifted B value up to unit (r-1,c), as in the array layout with
// units (0,0) to (2,2). A values enter row r at the left edge (a_in[r]); B
// values enter column c at the bottom (b_in[c]); the partial sum entering
// the top row is +0; the bottom row's sums leave on s_out[c]. One LD line
// goes to every unit.
//
// Timing: after ROWS cycles of shifting B into every column, the value
// that entered first sits in the top row; one LD pulse then fixes the
// stored matrix, unit (r,c) holding B[r][c]. If element r of an input
// vector x enters row r at cycle t0 + r (the diagonal skew), then
// s_out[c] holds sum_r x[r] * B[r][c] during cycle t0 + ROWS + c, summed
// top row first. The grid size of 3 x 3 is the size drawn; any size works.
module systolic_array
  import mm_pkg::*;
#(
  parameter int unsigned ROWS = 3,
  parameter int unsigned COLS = 3
) (
  input  logic                clk,
  input  logic                rst_n,
  input  fp32_t [ROWS-1:0]    a_in,
  input  fp32_t [COLS-1:0]    b_in,
  input  logic                ld,
  output fp32_t [COLS-1:0]    s_out
);
  // Horizontal A links: ah[r][c] enters unit (r,c); ah[r][COLS] is unused.
  fp32_t ah [ROWS][COLS+1];
  // Vertical sum links: sv[r][c] enters unit (r,c) from above.
  fp32_t sv [ROWS+1][COLS];
  // Vertical B links: bv[r][c] is the shifted B value leaving unit (r,c)
  // upwards; the top row's bv[0][c] goes nowhere.
  fp32_t bv [ROWS][COLS];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    assign ah[r][0] = a_in[r];
    for (genvar c = 0; c < COLS; c++) begin : g_col
      fp32_t b_from_below;
      if (r == ROWS - 1) begin : g_edge
        assign b_from_below = b_in[c];
      end else begin : g_inner
        assign b_from_below = bv[r+1][c];
      end
      systolic_pe u_pe (
        .clk   (clk),
        .rst_n (rst_n),
        .a_in  (ah[r][c]),
        .s_in  (sv[r][c]),
        .b_in  (b_from_below),
        .ld    (ld),
        .a_out (ah[r][c+1]),
        .s_out (sv[r+1][c]),
        .b_out (bv[r][c])
      );
    end
  end

  for (genvar c = 0; c < COLS; c++) begin : g_edge_col
    assign sv[0][c]  = FP32_ZERO;
    assign s_out[c]  = sv[ROWS][c];
  end
endmodule
