// systolic_matmul: matrix multiplier built around a ROWS x COLS systolic
// array, with the sequencer, read unit, buffers and write unit of the
// array layout.
//
// It computes C = A * B for an m x ROWS matrix A and a ROWS x n matrix B
// (n a multiple of COLS), one COLS-wide column strip of B at a time, in the
// four steps the array is operated by:
//  (1) the read unit fetches the ROWS x COLS strip of B into the COLS
//      bottom buffers; the sequencer shifts it up the columns for ROWS
//      cycles and pulses LD, so unit (r,c) holds B[r][c];
//  (2) the read unit fetches the rows of A into the ROWS left buffers;
//      the sequencer starts row i into the array by popping buffer 0 and,
//      r cycles later, buffer r (the diagonal skew);
//  (3) the sums leaving the bottom of column c are caught in result buffer
//      c, and the write unit stores C row by row;
//  (4) the steps repeat with the next strip of B.
// The sequencer starts a row only once all ROWS elements of it are in the
// left buffers and the result buffers have room for it, so once started a
// row runs through the array without a stall even if memory stalls. The
// array is only reloaded after the last row of a strip has left it.
//
// What follows the description: the arithmetic unit, the grid and its
// links, the four steps, the diagonal skew, buffers on the left, bottom
// and output side, a read and a write unit and a sequencer driving LD.
// This design's choices: buffer depths, the credit rules above, one
// memory port shared by reading and writing (writing first), k = ROWS
// (longer inner dimensions are split by the caller), +0 into the top row.
//
// Interface and memory port as for matmul_kernel: a job is taken when
// start is high while busy is low; done pulses once the last element of C
// is written; a read returns one cycle after it is accepted. job.k must
// equal ROWS and job.n must be a non-zero multiple of COLS.
//
// Timing: row i of a strip leaves column c of the array ROWS + c cycles
// after it was started; with a memory that never stalls the array takes a
// new row about every ROWS + COLS cycles, the rate at which a single
// memory port can read a row of A and write a row of C.
module systolic_matmul
  import mm_pkg::*;
#(
  parameter int unsigned ROWS    = 3,
  parameter int unsigned COLS    = 3,
  parameter int unsigned A_DEPTH = 8,   // rows of A buffered on the left
  parameter int unsigned R_DEPTH = 8    // rows of C buffered at the bottom
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
  localparam int unsigned DL  = ROWS + COLS - 1;    // start-signal delay line
  localparam int unsigned RW  = (ROWS > 1) ? $clog2(ROWS) : 1;
  localparam int unsigned CW  = (COLS > 1) ? $clog2(COLS) : 1;

  typedef logic [31:0] cnt_t;                       // job-wide row counters

  mm_job_t jr;
  logic    active;

  // ============================================================ read unit
  typedef enum logic [1:0] {R_IDLE, R_B, R_A} rd_state_t;
  rd_state_t rd_state;
  dim_t      rd_col0;                               // first column of the strip
  dim_t      rd_i;                                  // row of A
  logic [RW-1:0] rd_r;
  logic [CW-1:0] rd_c;
  logic      b_pending;                             // strip read, not yet loaded
  cnt_t      a_rows_issued, a_rows_pushed, a_rows_started, a_rows_consumed;
  cnt_t      rows_written;
  logic      rd_valid;
  addr_t     rd_addr;

  always_comb begin
    rd_valid = 1'b0;
    rd_addr  = '0;
    if (rd_state == R_B) begin
      rd_valid = !b_pending;
      rd_addr  = jr.b_base + addr_t'(rd_r) * addr_t'(jr.n) + addr_t'(rd_col0) + addr_t'(rd_c);
    end else if (rd_state == R_A) begin
      rd_valid = (rd_r != '0) || (a_rows_issued - a_rows_consumed < cnt_t'(A_DEPTH));
      rd_addr  = jr.a_base + addr_t'(rd_i) * addr_t'(ROWS) + addr_t'(rd_r);
    end
  end

  // =========================================================== write unit
  fp32_t [COLS-1:0] res_dout;
  logic  [COLS-1:0] res_empty, res_pop;
  dim_t             wr_col0, wr_i;
  logic [CW-1:0]    wr_c;
  logic             wr_valid;
  addr_t            wr_addr;

  assign wr_valid = active && !res_empty[wr_c];
  assign wr_addr  = jr.c_base + addr_t'(wr_i) * addr_t'(jr.n) + addr_t'(wr_col0) + addr_t'(wr_c);

  // ================================================= memory port sharing
  // Writing goes first; a request that is waiting keeps its owner so that
  // it stays unchanged until accepted.
  logic wait_q, wait_wr_q, sel_wr, wr_fire, rd_fire;
  assign sel_wr        = wait_q ? wait_wr_q : wr_valid;
  assign mem_req_valid = sel_wr ? wr_valid : rd_valid;
  assign wr_fire       = sel_wr && wr_valid && mem_req_ready;
  assign rd_fire       = !sel_wr && rd_valid && mem_req_ready;

  always_comb begin
    mem_req = '0;
    if (sel_wr) begin
      mem_req.we    = 1'b1;
      mem_req.addr  = wr_addr;
      mem_req.wdata = res_dout[wr_c];
    end else begin
      mem_req.addr  = rd_addr;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wait_q    <= 1'b0;
      wait_wr_q <= 1'b0;
    end else begin
      wait_q    <= mem_req_valid && !mem_req_ready;
      wait_wr_q <= sel_wr;
    end
  end

  // Read responses: where the returning word goes.
  logic          rsp_is_b;
  logic [RW-1:0] rsp_r;
  logic [CW-1:0] rsp_c;
  always_ff @(posedge clk) begin
    if (rd_fire) begin
      rsp_is_b <= (rd_state == R_B);
      rsp_r    <= rd_r;
      rsp_c    <= rd_c;
    end
  end

  // ============================================================== buffers
  logic  [ROWS-1:0] a_push, a_pop;
  fp32_t [ROWS-1:0] a_dout;
  logic  [COLS-1:0] b_push, b_pop, bf_full;
  fp32_t [COLS-1:0] b_dout;
  logic  [COLS-1:0] res_push;
  fp32_t [COLS-1:0] s_out;

  for (genvar r = 0; r < ROWS; r++) begin : g_abuf
    assign a_push[r] = mem_rsp_valid && !rsp_is_b && (rsp_r == RW'(r));
    sync_fifo #(.WIDTH(32), .DEPTH(A_DEPTH)) u_fifo (
      .clk, .rst_n, .push(a_push[r]), .din(mem_rsp_data), .pop(a_pop[r]),
      .dout(a_dout[r]), .empty(), .full(), .count()
    );
  end

  for (genvar c = 0; c < COLS; c++) begin : g_bbuf
    assign b_push[c] = mem_rsp_valid && rsp_is_b && (rsp_c == CW'(c));
    sync_fifo #(.WIDTH(32), .DEPTH(ROWS)) u_fifo (
      .clk, .rst_n, .push(b_push[c]), .din(mem_rsp_data), .pop(b_pop[c]),
      .dout(b_dout[c]), .empty(), .full(bf_full[c]), .count()
    );
  end

  for (genvar c = 0; c < COLS; c++) begin : g_rbuf
    assign res_pop[c] = wr_fire && (wr_c == CW'(c));
    sync_fifo #(.WIDTH(32), .DEPTH(R_DEPTH)) u_fifo (
      .clk, .rst_n, .push(res_push[c]), .din(s_out[c]), .pop(res_pop[c]),
      .dout(res_dout[c]), .empty(res_empty[c]), .full(), .count()
    );
  end

  // ============================================================ sequencer
  typedef enum logic [2:0] {Q_IDLE, Q_WAITB, Q_SHIFT, Q_LD, Q_STREAM, Q_END} seq_state_t;
  seq_state_t    q_state;
  logic [DL-1:0] dl;                                // dl[d]: row started d+1 cycles ago
  logic [RW:0]   sh_cnt;
  dim_t          q_col0, q_i;
  logic          pop0, ld, array_idle;
  fp32_t [ROWS-1:0] a_in;
  fp32_t [COLS-1:0] b_in;

  assign array_idle = (dl == '0);
  assign pop0 = (q_state == Q_STREAM) && (q_i < jr.m)
             && (a_rows_pushed != a_rows_started)
             && (a_rows_started - rows_written < cnt_t'(R_DEPTH));
  assign ld   = (q_state == Q_LD);

  for (genvar r = 0; r < ROWS; r++) begin : g_skew
    if (r == 0) begin : g_first
      assign a_pop[r] = pop0;
    end else begin : g_later
      assign a_pop[r] = dl[r-1];
    end
    assign a_in[r] = a_pop[r] ? a_dout[r] : FP32_ZERO;
  end

  for (genvar c = 0; c < COLS; c++) begin : g_bfeed
    assign b_pop[c]    = (q_state == Q_SHIFT);
    assign b_in[c]     = b_pop[c] ? b_dout[c] : FP32_ZERO;
    assign res_push[c] = dl[ROWS + c - 1];
  end

  systolic_array #(.ROWS(ROWS), .COLS(COLS)) u_array (
    .clk, .rst_n, .a_in(a_in), .b_in(b_in), .ld(ld), .s_out(s_out)
  );

  // ======================================================= state updates
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      jr              <= '0;
      active          <= 1'b0;
      done            <= 1'b0;
      rd_state        <= R_IDLE;
      rd_col0         <= '0;
      rd_i            <= '0;
      rd_r            <= '0;
      rd_c            <= '0;
      b_pending       <= 1'b0;
      a_rows_issued   <= '0;
      a_rows_pushed   <= '0;
      a_rows_started  <= '0;
      a_rows_consumed <= '0;
      rows_written    <= '0;
      q_state         <= Q_IDLE;
      dl              <= '0;
      sh_cnt          <= '0;
      q_col0          <= '0;
      q_i             <= '0;
      wr_col0         <= '0;
      wr_i            <= '0;
      wr_c            <= '0;
    end else begin
      done <= 1'b0;
      dl   <= {dl[DL-2:0], pop0};

      if (!active && start) begin
        jr              <= job;
        active          <= (job.m != '0) && (job.n != '0);
        done            <= (job.m == '0) || (job.n == '0);
        rd_state        <= ((job.m != '0) && (job.n != '0)) ? R_B : R_IDLE;
        q_state         <= ((job.m != '0) && (job.n != '0)) ? Q_WAITB : Q_IDLE;
        rd_col0         <= '0;
        rd_i            <= '0;
        rd_r            <= '0;
        rd_c            <= '0;
        b_pending       <= 1'b0;
        a_rows_issued   <= '0;
        a_rows_pushed   <= '0;
        a_rows_started  <= '0;
        a_rows_consumed <= '0;
        rows_written    <= '0;
        q_col0          <= '0;
        q_i             <= '0;
        wr_col0         <= '0;
        wr_i            <= '0;
        wr_c            <= '0;
      end

      // ---- read unit
      if (rd_fire) begin
        if (rd_state == R_B) begin
          if (rd_c == CW'(COLS - 1)) begin
            rd_c <= '0;
            if (rd_r == RW'(ROWS - 1)) begin
              rd_r      <= '0;
              b_pending <= 1'b1;
              rd_state  <= R_A;
              rd_i      <= '0;
            end else begin
              rd_r <= rd_r + 1'b1;
            end
          end else begin
            rd_c <= rd_c + 1'b1;
          end
        end else begin
          if (rd_r == RW'(ROWS - 1)) begin
            rd_r          <= '0;
            a_rows_issued <= a_rows_issued + 1'b1;
            if (rd_i == jr.m - 1'b1) begin
              rd_i    <= '0;
              rd_col0 <= rd_col0 + dim_t'(COLS);
              rd_state <= (rd_col0 + dim_t'(COLS) >= jr.n) ? R_IDLE : R_B;
            end else begin
              rd_i <= rd_i + 1'b1;
            end
          end else begin
            rd_r <= rd_r + 1'b1;
          end
        end
      end
      if (a_push[ROWS-1]) a_rows_pushed <= a_rows_pushed + 1'b1;
      if (a_pop[ROWS-1])  a_rows_consumed <= a_rows_consumed + 1'b1;

      // ---- sequencer
      unique case (q_state)
        Q_IDLE: ;
        Q_WAITB: begin
          if (b_pending && (&bf_full) && array_idle) begin
            q_state <= Q_SHIFT;
            sh_cnt  <= '0;
          end
        end
        Q_SHIFT: begin
          sh_cnt <= sh_cnt + 1'b1;
          if (sh_cnt == (RW+1)'(ROWS - 1)) q_state <= Q_LD;
        end
        Q_LD: begin
          b_pending <= 1'b0;
          q_i       <= '0;
          q_state   <= Q_STREAM;
        end
        Q_STREAM: begin
          if (pop0) begin
            a_rows_started <= a_rows_started + 1'b1;
            q_i            <= q_i + 1'b1;
            if (q_i == jr.m - 1'b1) begin
              q_col0  <= q_col0 + dim_t'(COLS);
              q_state <= (q_col0 + dim_t'(COLS) >= jr.n) ? Q_END : Q_WAITB;
            end
          end
        end
        Q_END: ;
        default: q_state <= Q_IDLE;
      endcase

      // ---- write unit
      if (wr_fire) begin
        if (wr_c == CW'(COLS - 1)) begin
          wr_c         <= '0;
          rows_written <= rows_written + 1'b1;
          if (wr_i == jr.m - 1'b1) begin
            wr_i    <= '0;
            wr_col0 <= wr_col0 + dim_t'(COLS);
            if (wr_col0 + dim_t'(COLS) >= jr.n) begin
              active  <= 1'b0;
              done    <= 1'b1;
              q_state <= Q_IDLE;
            end
          end else begin
            wr_i <= wr_i + 1'b1;
          end
        end else begin
          wr_c <= wr_c + 1'b1;
        end
      end
    end
  end

  assign busy = active;

  // ============================================================ assertions
  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
    mem_req_valid && !mem_req_ready |=> mem_req_valid && $stable(mem_req));
  a_job_shape: assert property (@(posedge clk) disable iff (!rst_n)
    start && !busy && job.m != '0 |-> job.k == dim_t'(ROWS));
  a_rsp_expected: assert property (@(posedge clk) disable iff (!rst_n)
    mem_rsp_valid |-> active);
endmodule
