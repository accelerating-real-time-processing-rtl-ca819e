// tb_workloads: runs the blocked kernel, at its default 64 x 64 submatrix
// size, on the three layer shapes of the parser that were measured with
// one sentence batch of 8 rows: 8 x 2304 times 2304 x 512, 8 x 512 times
// 512 x 512 and 8 x 512 times 512 x 93. The host pads each operand with
// zeros to a multiple of 64 (8 rows become 64, 93 columns become 128).
// For each shape the cycle count is checked against the kernel's timing
// formula on a memory that never stalls, the 8 real rows of C are checked
// element by element against a reference, and the padded rows and columns
// must come out zero. The 8192-row shapes differ only in the number of row
// submatrices (128 instead of 1) and are not simulated.
module tb_workloads;
  import mm_pkg::*;
  import fp_ref_pkg::*;
  import mm_ref_pkg::*;

  localparam int unsigned BLK   = 64;
  localparam int unsigned WORDS = 1 << 21;
  localparam addr_t A0 = 0, B0 = 1 << 18, C0 = (1 << 20) + (1 << 19);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic     start, busy, done, req_valid, req_ready, rsp_valid;
  mm_job_t  job;
  mem_req_t req;
  fp32_t    rsp_data;
  int       checks = 0, failures = 0;

  matmul_kernel dut (
    .clk, .rst_n, .start, .job, .busy, .done,
    .mem_req_valid(req_valid), .mem_req(req), .mem_req_ready(req_ready),
    .mem_rsp_valid(rsp_valid), .mem_rsp_data(rsp_data)
  );

  dram_model #(.WORDS(WORDS)) u_mem (
    .clk, .rst_n, .stall_pct(0), .wstall_pct(0),
    .req_valid, .req, .req_ready, .rsp_valid, .rsp_data
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic run_shape(int mr, int kr, int nr);
    int m, k, n;
    longint t0, t1, expect_cycles;
    m = (mr + BLK - 1) / BLK * BLK;
    k = (kr + BLK - 1) / BLK * BLK;
    n = (nr + BLK - 1) / BLK * BLK;
    for (int i = 0; i < m; i++)
      for (int j = 0; j < k; j++)
        u_mem.mem[A0 + i * k + j] = (i < mr && j < kr) ? rand_elem() : 32'h0;
    for (int i = 0; i < k; i++)
      for (int j = 0; j < n; j++)
        u_mem.mem[B0 + i * n + j] = (i < kr && j < nr) ? rand_elem() : 32'h0;
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
    expect_cycles = 1 + longint'(m / BLK) * (n / BLK)
                    * ((k / BLK) * (3 * BLK * BLK + 1 + $clog2(BLK) + 1) + BLK * BLK);
    check(t1 - t0 == expect_cycles, $sformatf("cycles %0d expected %0d", t1 - t0, expect_cycles));
    $display("shape %0dx%0d x %0dx%0d (padded %0dx%0d x %0dx%0d): %0d cycles",
             mr, kr, kr, nr, m, k, k, n, t1 - t0);
    for (int i = 0; i < m; i++)
      for (int j = 0; j < n; j++) begin
        if (i >= mr || j >= nr) begin
          check(u_mem.mem[C0 + i * n + j][30:0] == 31'd0, "padding gives zero");
        end else begin
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
      end
  endtask

  initial begin
    repeat (6000000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0;
    job = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_shape(8, 512, 93);
    run_shape(8, 512, 512);
    run_shape(8, 2304, 512);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
