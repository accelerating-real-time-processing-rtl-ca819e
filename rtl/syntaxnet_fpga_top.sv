// syntaxnet_fpga_top: FPGA side of a matrix-multiplication offload for a
// transition-based neural-network parser.
//
// The parser spends most of its time in the fully connected layers of its
// decision network, i.e. in single-precision matrix products whose shapes
// change as parsing goes on. The host copies the operands into the board's
// DRAM (padding every dimension with zeros to a multiple of the submatrix
// size), starts a job and collects C when done is seen.
//
// Two multipliers stand side by side, each with its own job port and its
// own memory port towards the board memory:
//  - u_kernel (matmul_kernel): the blocked multiplier with 64 x 64
//    submatrices held on chip and a fully unrolled 64-wide dot product.
//    This is the configuration that is used for the offload.
//  - u_systolic (systolic_matmul): the systolic-array multiplier built
//    from multiply-add units with a held B operand, here 3 x 3 as drawn.
// The DRAM, its controller and the PCIe/host side are outside this design;
// their memory ports are brought out (see matmul_kernel for the port
// protocol: valid/ready requests, read data one cycle after acceptance).
module syntaxnet_fpga_top
  import mm_pkg::*;
#(
  parameter int unsigned BLK     = 64,   // kernel submatrix size
  parameter int unsigned SA_ROWS = 3,    // systolic array rows
  parameter int unsigned SA_COLS = 3     // systolic array columns
) (
  input  logic     clk,
  input  logic     rst_n,
  // blocked kernel: job and memory port
  input  logic     mk_start,
  input  mm_job_t  mk_job,
  output logic     mk_busy,
  output logic     mk_done,
  output logic     mk_mem_req_valid,
  output mem_req_t mk_mem_req,
  input  logic     mk_mem_req_ready,
  input  logic     mk_mem_rsp_valid,
  input  fp32_t    mk_mem_rsp_data,
  // systolic multiplier: job and memory port
  input  logic     sa_start,
  input  mm_job_t  sa_job,
  output logic     sa_busy,
  output logic     sa_done,
  output logic     sa_mem_req_valid,
  output mem_req_t sa_mem_req,
  input  logic     sa_mem_req_ready,
  input  logic     sa_mem_rsp_valid,
  input  fp32_t    sa_mem_rsp_data
);
  matmul_kernel #(.BLK(BLK)) u_kernel (
    .clk           (clk),
    .rst_n         (rst_n),
    .start         (mk_start),
    .job           (mk_job),
    .busy          (mk_busy),
    .done          (mk_done),
    .mem_req_valid (mk_mem_req_valid),
    .mem_req       (mk_mem_req),
    .mem_req_ready (mk_mem_req_ready),
    .mem_rsp_valid (mk_mem_rsp_valid),
    .mem_rsp_data  (mk_mem_rsp_data)
  );

  systolic_matmul #(.ROWS(SA_ROWS), .COLS(SA_COLS)) u_systolic (
    .clk           (clk),
    .rst_n         (rst_n),
    .start         (sa_start),
    .job           (sa_job),
    .busy          (sa_busy),
    .done          (sa_done),
    .mem_req_valid (sa_mem_req_valid),
    .mem_req       (sa_mem_req),
    .mem_req_ready (sa_mem_req_ready),
    .mem_rsp_valid (sa_mem_rsp_valid),
    .mem_rsp_data  (sa_mem_rsp_data)
  );
endmodule
