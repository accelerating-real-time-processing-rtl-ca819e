// mm_pkg: types and constants shared by the matrix-multiplication offload.
//
// Every matrix element is an IEEE-754 single-precision number (the kernel
// computes "float" dot products). Matrices live in an external word-addressed
// memory, one 32-bit element per address, stored row-major. A job is a set
// of three base addresses and the three matrix dimensions of C = A * B
// (A is m x k, B is k x n, C is m x n).
//
// The memory request bundle below is this design's own choice: a request is
// offered with valid/ready; a read returns its data exactly one cycle after
// the request is accepted.
package mm_pkg;
  typedef logic [31:0] fp32_t;

  localparam int unsigned ADDR_W = 32;   // word address (8 GB DDR3 = 2^31 words)
  localparam int unsigned DIM_W  = 16;   // matrix dimensions up to 65535

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [DIM_W-1:0]  dim_t;

  typedef struct packed {
    logic  we;     // 1 = write, 0 = read
    addr_t addr;   // word address
    fp32_t wdata;  // write data
  } mem_req_t;

  typedef struct packed {
    addr_t a_base; // A[i][j] at a_base + i*k + j
    addr_t b_base; // B[i][j] at b_base + i*n + j
    addr_t c_base; // C[i][j] at c_base + i*n + j
    dim_t  m;      // rows of A and C
    dim_t  k;      // columns of A, rows of B
    dim_t  n;      // columns of B and C
  } mm_job_t;

  localparam fp32_t FP32_ZERO = 32'h0000_0000;
  localparam fp32_t FP32_QNAN = 32'h7fc0_0000;
endpackage
