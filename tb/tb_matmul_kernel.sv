// tb_matmul_kernel: runs the blocked multiplier on several jobs with a
// reduced submatrix size (BLK = 4) and checks every element of C against a
// reference that blocks and sums in the same order. The first job runs on a
// memory that never stalls and checks the cycle count against the timing
// formula; the others run with random memory stalls, several K steps
// (accumulation) and several C submatrices.
module tb_matmul_kernel;
  import mm_pkg::*;
  import fp_ref_pkg::*;
  import mm_ref_pkg::*;

  localparam int unsigned BLK   = 4;
  localparam int unsigned WORDS = 16384;
  localparam addr_t A0 = 0, B0 = 4096, C0 = 8192;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic     start, busy, done;
  mm_job_t  job;
  logic     req_valid, req_ready, rsp_valid;
  mem_req_t req;
  fp32_t    rsp_data;
  int       stall_pct, wstall_pct;
  int       checks = 0, failures = 0;
  longint   cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  matmul_kernel #(.BLK(BLK)) dut (
    .clk, .rst_n, .start, .job, .busy, .done,
    .mem_req_valid(req_valid), .mem_req(req), .mem_req_ready(req_ready),
    .mem_rsp_valid(rsp_valid), .mem_rsp_data(rsp_data)
  );

  dram_model #(.WORDS(WORDS)) u_mem (
    .clk, .rst_n, .stall_pct, .wstall_pct, .req_valid, .req, .req_ready, .rsp_valid, .rsp_data
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic run_job(int m, int k, int n, int stall, bit check_time);
    longint t0, t1;
    int kbs, t;
    stall_pct = stall;
    wstall_pct = stall;
    for (int i = 0; i < m * k; i++) u_mem.mem[A0 + i] = rand_elem();
    for (int i = 0; i < k * n; i++) u_mem.mem[B0 + i] = rand_elem();
    for (int i = 0; i < m * n; i++) u_mem.mem[C0 + i] = 32'hdeadbeef;
    job = '{a_base: A0, b_base: B0, c_base: C0, m: dim_t'(m), k: dim_t'(k), n: dim_t'(n)};
    @(negedge clk);
    start = 1;
    @(posedge clk);
    t0 = cycle;
    @(negedge clk);
    start = 0;
    while (!done) @(posedge clk);
    t1 = cycle;
    @(negedge clk);
    check(!busy, "busy after done");
    if (check_time) begin
      kbs = k / BLK;
      t = (m / BLK) * (n / BLK);
      check(t1 - t0 == longint'(1 + t * (kbs * (3 * BLK * BLK + 1 + ($clog2(BLK) + 1)) + BLK * BLK)),
            $sformatf("cycle count %0d", t1 - t0));
    end
    for (int i = 0; i < m; i++)
      for (int j = 0; j < n; j++) begin
        logic [31:0] c, d;
        logic [31:0] av[], bv[];
        av = new[BLK];
        bv = new[BLK];
        for (int kb = 0; kb < k / BLK; kb++) begin
          for (int q = 0; q < BLK; q++) begin
            av[q] = u_mem.mem[A0 + i * k + kb * BLK + q];
            bv[q] = u_mem.mem[B0 + (kb * BLK + q) * n + j];
          end
          d = ref_dot_tree(av, bv);
          c = (kb == 0) ? d : ref_add(c, d);
        end
        check(same(u_mem.mem[C0 + i * n + j], c),
              $sformatf("C[%0d][%0d] = %h expected %h", i, j, u_mem.mem[C0 + i * n + j], c));
      end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0;
    stall_pct = 0;
    wstall_pct = 0;
    job = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_job(8, 8, 8, 0, 1);
    run_job(4, 4, 4, 0, 1);
    run_job(8, 12, 4, 30, 0);
    run_job(12, 4, 8, 50, 0);
    run_job(4, 16, 12, 20, 0);
    check(u_mem.stalls > 0, "memory stalls exercised");
    check(u_mem.bad_addr == 0, "addresses in range");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
