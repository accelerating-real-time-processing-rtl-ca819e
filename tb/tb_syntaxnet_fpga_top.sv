// tb_syntaxnet_fpga_top: end-to-end test of the offload top at its default
// parameters (64 x 64 submatrices, 3 x 3 systolic array), each multiplier
// on its own memory model.
//
// Blocked kernel:
//  - a 128 x 128 x 128 product on a memory that never stalls, with the
//    cycle count checked against the kernel's timing formula;
//  - a product with the shapes of the parser's smallest layer, 8 x 100
//    times 100 x 93, which the testbench zero-pads to 64 x 128 times
//    128 x 128 as the host does, run with random memory stalls; the
//    padded rows and columns of C must come out zero;
// Systolic multiplier: two jobs with several B strips and memory stalls.
// Every element of C is checked against a reference. Counted mechanisms,
// each of which must occur: memory stalls, accumulation over several K
// steps, several C submatrices per job, zero-padded operands, reloading
// of the systolic array (repeating the four steps).
module tb_syntaxnet_fpga_top;
  import mm_pkg::*;
  import fp_ref_pkg::*;
  import mm_ref_pkg::*;

  localparam int unsigned BLK = 64, ROWS = 3, COLS = 3;
  localparam int unsigned WORDS = 65536;
  localparam addr_t A0 = 0, B0 = 16384, C0 = 32768;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic     mk_start, mk_busy, mk_done, mk_req_valid, mk_req_ready, mk_rsp_valid;
  mm_job_t  mk_job, sa_job;
  mem_req_t mk_req, sa_req;
  fp32_t    mk_rsp_data, sa_rsp_data;
  logic     sa_start, sa_busy, sa_done, sa_req_valid, sa_req_ready, sa_rsp_valid;
  int       mk_stall, sa_stall;

  int checks = 0, failures = 0;
  int n_kstep_acc = 0, n_tiles = 0, n_padded = 0, n_reload = 0;

  syntaxnet_fpga_top dut (
    .clk, .rst_n,
    .mk_start, .mk_job, .mk_busy, .mk_done,
    .mk_mem_req_valid(mk_req_valid), .mk_mem_req(mk_req), .mk_mem_req_ready(mk_req_ready),
    .mk_mem_rsp_valid(mk_rsp_valid), .mk_mem_rsp_data(mk_rsp_data),
    .sa_start, .sa_job, .sa_busy, .sa_done,
    .sa_mem_req_valid(sa_req_valid), .sa_mem_req(sa_req), .sa_mem_req_ready(sa_req_ready),
    .sa_mem_rsp_valid(sa_rsp_valid), .sa_mem_rsp_data(sa_rsp_data)
  );

  dram_model #(.WORDS(WORDS)) u_mk_mem (
    .clk, .rst_n, .stall_pct(mk_stall), .wstall_pct(mk_stall),
    .req_valid(mk_req_valid), .req(mk_req), .req_ready(mk_req_ready),
    .rsp_valid(mk_rsp_valid), .rsp_data(mk_rsp_data)
  );

  dram_model #(.WORDS(WORDS)) u_sa_mem (
    .clk, .rst_n, .stall_pct(sa_stall), .wstall_pct(sa_stall),
    .req_valid(sa_req_valid), .req(sa_req), .req_ready(sa_req_ready),
    .rsp_valid(sa_rsp_valid), .rsp_data(sa_rsp_data)
  );

  // Mechanism counters seen at the kernel's memory port: a C submatrix
  // write-back begins with a write after reads; a K step after the first
  // is a copy that begins while the same submatrix is still open.
  logic mk_last_we = 1'b1;
  int   mk_reads_since_write = 0;
  always @(posedge clk) begin
    if (mk_req_valid && mk_req_ready) begin
      if (mk_req.we && !mk_last_we) n_tiles++;
      if (!mk_req.we) mk_reads_since_write++;
      else            mk_reads_since_write = 0;
      if (!mk_req.we && mk_reads_since_write == 2 * BLK * BLK + 1) n_kstep_acc++;
      mk_last_we = mk_req.we;
    end
    if (dut.u_systolic.ld) n_reload++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // Blocked kernel: an mr x kr by kr x nr product, zero-padded to
  // multiples of BLK.
  task automatic run_kernel(int mr, int kr, int nr, int stall, bit check_time);
    int m, k, n;
    longint t0, t1;
    m = (mr + BLK - 1) / BLK * BLK;
    k = (kr + BLK - 1) / BLK * BLK;
    n = (nr + BLK - 1) / BLK * BLK;
    if (m != mr || k != kr || n != nr) n_padded++;
    mk_stall = stall;
    for (int i = 0; i < m; i++)
      for (int j = 0; j < k; j++)
        u_mk_mem.mem[A0 + i * k + j] = (i < mr && j < kr) ? rand_elem() : 32'h0;
    for (int i = 0; i < k; i++)
      for (int j = 0; j < n; j++)
        u_mk_mem.mem[B0 + i * n + j] = (i < kr && j < nr) ? rand_elem() : 32'h0;
    for (int i = 0; i < m * n; i++) u_mk_mem.mem[C0 + i] = 32'hdeadbeef;
    mk_job = '{a_base: A0, b_base: B0, c_base: C0, m: dim_t'(m), k: dim_t'(k), n: dim_t'(n)};
    @(negedge clk);
    mk_start = 1;
    @(posedge clk);
    t0 = cycle;
    @(negedge clk);
    mk_start = 0;
    while (!mk_done) @(posedge clk);
    t1 = cycle;
    if (check_time)
      check(t1 - t0 == longint'(1 + (m / BLK) * (n / BLK)
                        * ((k / BLK) * (3 * BLK * BLK + 1 + $clog2(BLK) + 1) + BLK * BLK)),
            $sformatf("kernel cycle count %0d", t1 - t0));
    for (int i = 0; i < m; i++)
      for (int j = 0; j < n; j++) begin
        logic [31:0] c, d;
        logic [31:0] av[], bv[];
        av = new[BLK];
        bv = new[BLK];
        for (int kb = 0; kb < k / BLK; kb++) begin
          for (int q = 0; q < BLK; q++) begin
            av[q] = u_mk_mem.mem[A0 + i * k + kb * BLK + q];
            bv[q] = u_mk_mem.mem[B0 + (kb * BLK + q) * n + j];
          end
          d = ref_dot_tree(av, bv);
          c = (kb == 0) ? d : ref_add(c, d);
        end
        if (i >= mr || j >= nr) check(u_mk_mem.mem[C0 + i * n + j][30:0] == 31'd0, "padding gives zero");
        else check(same(u_mk_mem.mem[C0 + i * n + j], c),
                   $sformatf("kernel C[%0d][%0d] = %h expected %h", i, j, u_mk_mem.mem[C0 + i * n + j], c));
      end
  endtask

  task automatic run_systolic(int m, int n, int stall);
    sa_stall = stall;
    for (int i = 0; i < m * ROWS; i++) u_sa_mem.mem[A0 + i] = rand_elem();
    for (int i = 0; i < ROWS * n; i++) u_sa_mem.mem[B0 + i] = rand_elem();
    for (int i = 0; i < m * n; i++)    u_sa_mem.mem[C0 + i] = 32'hdeadbeef;
    sa_job = '{a_base: A0, b_base: B0, c_base: C0, m: dim_t'(m), k: dim_t'(ROWS), n: dim_t'(n)};
    @(negedge clk);
    sa_start = 1;
    @(negedge clk);
    sa_start = 0;
    while (!sa_done) @(posedge clk);
    for (int i = 0; i < m; i++)
      for (int j = 0; j < n; j++) begin
        logic [31:0] s;
        s = 32'h0;
        for (int r = 0; r < ROWS; r++)
          s = ref_add(ref_mul(u_sa_mem.mem[A0 + i * ROWS + r], u_sa_mem.mem[B0 + r * n + j]), s);
        check(same(u_sa_mem.mem[C0 + i * n + j], s),
              $sformatf("systolic C[%0d][%0d] = %h expected %h", i, j, u_sa_mem.mem[C0 + i * n + j], s));
      end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mk_start = 0; sa_start = 0; mk_job = '0; sa_job = '0;
    mk_stall = 0; sa_stall = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      begin
        run_kernel(128, 128, 128, 0, 1);
        run_kernel(8, 100, 93, 25, 0);
      end
      begin
        run_systolic(50, 12, 30);
        run_systolic(7, 3, 0);
      end
    join
    check(!mk_busy && !sa_busy, "both idle at the end");
    check(u_mk_mem.stalls > 0 && u_sa_mem.stalls > 0, "memory stalls on both ports");
    check(n_kstep_acc > 0, "accumulation over several K steps");
    check(n_tiles == 4 + 2, $sformatf("C submatrices written: %0d", n_tiles));
    check(n_padded > 0, "zero-padded job");
    check(n_reload == 4 + 1, $sformatf("systolic reloads: %0d", n_reload));
    check(u_mk_mem.bad_addr == 0 && u_sa_mem.bad_addr == 0, "addresses in range");
    $display("kernel: stalls=%0d ksteps=%0d tiles=%0d padded_jobs=%0d; systolic: stalls=%0d reloads=%0d",
             u_mk_mem.stalls, n_kstep_acc, n_tiles, n_padded, u_sa_mem.stalls, n_reload);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
