// matmul_kernel: blocked single-precision matrix multiplier, C = A * B.
//
// The matrices stay in external memory; the kernel walks C in BLK x BLK
// submatrices. For each C submatrix (bi,bj) it runs over the K dimension
// in steps of BLK: it copies the A submatrix (bi,kb) and the B submatrix
// (kb,bj) from external memory into on-chip buffers, then computes all
// BLK*BLK dot products of length BLK, one per cycle, in a fully unrolled
// dot-product unit, and adds each into an on-chip C submatrix buffer (the
// first K step writes instead of adding). After the last K step the C
// submatrix is written back. All of this follows the described kernel:
// triple loop, inner loop run in parallel, partial data copied from DRAM
// into internal memory, 64 x 64 submatrices. The sequencing (copy, compute
// and write-back done one after the other, one 32-bit word per memory
// beat) is this design's own, simplest choice.
//
// Dimensions m, k and n must be non-zero multiples of BLK; the host pads
// the matrices with zeros to get there. B is kept transposed on chip so
// that a row of A and a column of B are read in one cycle.
//
// Interface: a job is taken when start is high in an idle cycle (busy low);
// done pulses for one cycle after the last element of C has been written.
// The memory port offers a request with mem_req_valid and holds it until
// mem_req_ready; a read returns its data on mem_rsp_valid/mem_rsp_data
// exactly one cycle after it was accepted.
//
// Timing with a memory that never stalls: per C submatrix and K step,
// 2*BLK*BLK + 1 cycles of copying, BLK*BLK cycles of computing and
// LAT = 1 + log2(BLK) cycles of draining; per C submatrix BLK*BLK cycles
// of writing back. done follows start by 1 + T*(KB*(3*BLK*BLK + 1 + LAT)
// + BLK*BLK) cycles for T = (m/BLK)*(n/BLK) submatrices and KB = k/BLK.
module matmul_kernel
  import mm_pkg::*;
#(
  parameter int unsigned BLK = 64
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  mm_job_t  job,
  output logic     busy,
  output logic     done,
  output logic     mem_req_valid,
  output mem_req_t mem_req,
  input  logic     mem_req_ready,
  input  logic     mem_rsp_valid,
  input  fp32_t    mem_rsp_data
);
  localparam int unsigned LB  = $clog2(BLK);
  localparam int unsigned EW  = 2 * LB;            // element index in a submatrix
  localparam int unsigned NE  = BLK * BLK;         // elements per submatrix

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_COMPUTE, S_DRAIN, S_STORE} state_t;

  state_t        state;
  mm_job_t       jr;
  dim_t          bi, bj, kb;                        // submatrix indices
  dim_t          nbi, nbj, nbk;                     // submatrix counts
  logic [EW:0]   iss, rcv;                          // copy counters, bit EW selects B
  logic [EW-1:0] ce, se;                            // compute / store element
  logic [EW:0]   out_cnt;                           // dot products accumulated
  logic          iss_all;                           // all copy reads issued

  fp32_t [BLK-1:0] a_loc [BLK];                     // a_loc[r][c] = A_sub[r][c]
  fp32_t [BLK-1:0] b_loc [BLK];                     // b_loc[c][r] = B_sub[r][c]
  fp32_t           c_loc [NE];                      // C_sub, row-major

  // Response bookkeeping: which element the returning word belongs to.
  logic          rsp_sel;
  logic [LB-1:0] rsp_r, rsp_c;
  assign {rsp_sel, rsp_r, rsp_c} = rcv;

  // ---------------------------------------------------------------- memory
  logic [LB-1:0] iss_r, iss_c, st_r, st_c;
  assign iss_r = iss[EW-1:LB];
  assign iss_c = iss[LB-1:0];
  assign st_r  = se[EW-1:LB];
  assign st_c  = se[LB-1:0];

  always_comb begin
    mem_req_valid = 1'b0;
    mem_req       = '0;
    if (state == S_LOAD && !iss_all && !iss[EW]) begin
      mem_req_valid = 1'b1;
      mem_req.addr  = jr.a_base
                    + (addr_t'(bi) * BLK + addr_t'(iss_r)) * addr_t'(jr.k)
                    + addr_t'(kb) * BLK + addr_t'(iss_c);
    end else if (state == S_LOAD && !iss_all) begin
      mem_req_valid = 1'b1;
      mem_req.addr  = jr.b_base
                    + (addr_t'(kb) * BLK + addr_t'(iss_r)) * addr_t'(jr.n)
                    + addr_t'(bj) * BLK + addr_t'(iss_c);
    end else if (state == S_STORE) begin
      mem_req_valid = 1'b1;
      mem_req.we    = 1'b1;
      mem_req.addr  = jr.c_base
                    + (addr_t'(bi) * BLK + addr_t'(st_r)) * addr_t'(jr.n)
                    + addr_t'(bj) * BLK + addr_t'(st_c);
      mem_req.wdata = c_loc[se];
    end
  end

  logic req_fire;
  assign req_fire = mem_req_valid && mem_req_ready;

  // ---------------------------------------------------------- dot product
  logic                dp_out_valid;
  fp32_t               dp_sum;
  logic [EW-1:0]       dp_out_tag;
  fp32_t               acc_sum;

  dot_product #(.N(BLK), .TAG_W(EW)) u_dot (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (state == S_COMPUTE),
    .a         (a_loc[ce[EW-1:LB]]),
    .b         (b_loc[ce[LB-1:0]]),
    .in_tag    (ce),
    .out_valid (dp_out_valid),
    .sum       (dp_sum),
    .out_tag   (dp_out_tag)
  );

  fp32_add u_acc (.a(c_loc[dp_out_tag]), .b(dp_sum), .y(acc_sum));

  always_ff @(posedge clk) begin
    if (dp_out_valid) c_loc[dp_out_tag] <= (kb == '0) ? dp_sum : acc_sum;
    if (mem_rsp_valid && state == S_LOAD) begin
      if (!rsp_sel) a_loc[rsp_r][rsp_c] <= mem_rsp_data;
      else          b_loc[rsp_c][rsp_r] <= mem_rsp_data;
    end
  end

  // -------------------------------------------------------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      jr      <= '0;
      bi      <= '0;
      bj      <= '0;
      kb      <= '0;
      nbi     <= '0;
      nbj     <= '0;
      nbk     <= '0;
      iss     <= '0;
      iss_all <= 1'b0;
      rcv     <= '0;
      ce      <= '0;
      se      <= '0;
      out_cnt <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            jr  <= job;
            nbi <= job.m >> LB;
            nbj <= job.n >> LB;
            nbk <= job.k >> LB;
            bi  <= '0;
            bj  <= '0;
            kb  <= '0;
            iss <= '0;
            iss_all <= 1'b0;
            rcv <= '0;
            if (job.m == '0 || job.n == '0 || job.k == '0) done <= 1'b1;
            else                                           state <= S_LOAD;
          end
        end
        S_LOAD: begin
          if (req_fire && !iss_all) begin
            if (iss == (EW+1)'(2 * NE - 1)) iss_all <= 1'b1;
            else                             iss     <= iss + 1'b1;
          end
          if (mem_rsp_valid) begin
            rcv <= rcv + 1'b1;
            if (rcv == (EW+1)'(2 * NE - 1)) begin
              state   <= S_COMPUTE;
              ce      <= '0;
              out_cnt <= '0;
            end
          end
        end
        S_COMPUTE: begin
          ce <= ce + 1'b1;
          if (ce == EW'(NE - 1)) state <= S_DRAIN;
        end
        S_DRAIN: begin
          if (dp_out_valid && out_cnt == (EW+1)'(NE - 1)) begin
            if (kb + 1'b1 < nbk) begin
              kb      <= kb + 1'b1;
              state   <= S_LOAD;
              iss     <= '0;
              iss_all <= 1'b0;
              rcv     <= '0;
            end else begin
              state <= S_STORE;
              se    <= '0;
            end
          end
        end
        S_STORE: begin
          if (req_fire) begin
            se <= se + 1'b1;
            if (se == EW'(NE - 1)) begin
              kb      <= '0;
              iss     <= '0;
              iss_all <= 1'b0;
              rcv     <= '0;
              state   <= S_LOAD;
              if (bj + 1'b1 < nbj) begin
                bj <= bj + 1'b1;
              end else begin
                bj <= '0;
                if (bi + 1'b1 < nbi) begin
                  bi <= bi + 1'b1;
                end else begin
                  state <= S_IDLE;
                  done  <= 1'b1;
                end
              end
            end
          end
        end
        default: state <= S_IDLE;
      endcase
      if (dp_out_valid) out_cnt <= out_cnt + 1'b1;
      if (state == S_LOAD && mem_rsp_valid && rcv == (EW+1)'(2 * NE - 1)) out_cnt <= '0;
    end
  end

  assign busy = (state != S_IDLE);

  // ------------------------------------------------------------ assertions
  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
    mem_req_valid && !mem_req_ready |=> mem_req_valid && $stable(mem_req));
  a_dims: assert property (@(posedge clk) disable iff (!rst_n)
    start && !busy |-> (job.m[LB-1:0] == '0 && job.k[LB-1:0] == '0 && job.n[LB-1:0] == '0));
  a_rsp_expected: assert property (@(posedge clk) disable iff (!rst_n)
    mem_rsp_valid |-> state == S_LOAD);
endmodule
