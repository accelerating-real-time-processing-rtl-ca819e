// dot_product: pipelined single-precision dot product of two N-element
// vectors.
//
// This is the kernel's innermost loop, sum += A[i][k] * B[k][j], unrolled
// over a whole submatrix width so that N products are formed in parallel
// each cycle. The N products are registered, then summed by a binary tree
// of adders with a register after every level. The tree is stored as a
// heap: node 1 is the root, node i has children 2i and 2i+1, and the
// products are the leaves N..2N-1. One new vector pair is accepted every
// cycle; its sum appears LATENCY = 1 + log2(N) cycles later, together with
// the tag that came in with it. Note that the tree sums in a different
// order than a sequential loop, so results can differ from one in the last
// bits. N must be a power of two. Unrolling the whole inner loop follows
// the described kernel; the tree arrangement is this design's choice.
module dot_product
  import mm_pkg::*;
#(
  parameter int unsigned N     = 64,
  parameter int unsigned TAG_W = 12
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  fp32_t [N-1:0]        a,
  input  fp32_t [N-1:0]        b,
  input  logic [TAG_W-1:0]     in_tag,
  output logic                 out_valid,
  output fp32_t                sum,
  output logic [TAG_W-1:0]     out_tag
);
  localparam int unsigned LEVELS  = $clog2(N);
  localparam int unsigned LATENCY = LEVELS + 1;

  fp32_t node [1:2*N-1];
  logic [LATENCY-1:0] vld;
  logic [TAG_W-1:0]   tag [LATENCY];

  for (genvar j = 0; j < N; j++) begin : g_mul
    fp32_t p;
    fp32_mul u_mul (.a(a[j]), .b(b[j]), .y(p));
    always_ff @(posedge clk) node[N + j] <= p;
  end

  for (genvar i = 1; i < N; i++) begin : g_add
    fp32_t s;
    fp32_add u_add (.a(node[2*i]), .b(node[2*i + 1]), .y(s));
    always_ff @(posedge clk) node[i] <= s;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LATENCY-2:0], in_valid};
  end

  always_ff @(posedge clk) begin
    tag[0] <= in_tag;
    for (int s = 1; s < LATENCY; s++) tag[s] <= tag[s-1];
  end

  assign out_valid = vld[LATENCY-1];
  assign sum       = (N == 1) ? node[N] : node[1];
  assign out_tag   = tag[LATENCY-1];

  initial assert (N >= 2 && (N & (N - 1)) == 0) else $error("dot_product: N must be a power of two >= 2");
endmodule
