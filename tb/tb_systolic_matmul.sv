// tb_systolic_matmul: runs the systolic multiplier (3 x 3 array, result
// buffers one row deep) on jobs
// of several shapes against the memory model, with and without random
// memory stalls, and checks every element of C against a reference that
// sums the products top row first, as the array column does. It also
// counts how often the array was reloaded with a new strip of B, how often
// a row had to wait for its data and how often the result buffers held the
// sequencer back, and fails if any of these never happened.
module tb_systolic_matmul;
  import mm_pkg::*;
  import fp_ref_pkg::*;
  import mm_ref_pkg::*;

  localparam int unsigned ROWS = 3, COLS = 3;
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
  int       n_reload = 0, n_wait_data = 0, n_wait_credit = 0;

  // A one-row result buffer, so that the result-buffer credit rule binds.
  systolic_matmul #(.R_DEPTH(1)) dut (
    .clk, .rst_n, .start, .job, .busy, .done,
    .mem_req_valid(req_valid), .mem_req(req), .mem_req_ready(req_ready),
    .mem_rsp_valid(rsp_valid), .mem_rsp_data(rsp_data)
  );

  dram_model #(.WORDS(WORDS)) u_mem (
    .clk, .rst_n, .stall_pct, .wstall_pct, .req_valid, .req, .req_ready, .rsp_valid, .rsp_data
  );

  // Mechanism counters, observed inside the sequencer.
  always @(posedge clk) begin
    if (dut.ld) n_reload++;
    if (int'(dut.q_state) == 4 && dut.q_i < dut.jr.m) begin   // 4: Q_STREAM
      if (dut.a_rows_pushed == dut.a_rows_started) n_wait_data++;
      else if (dut.a_rows_started - dut.rows_written >= 1) n_wait_credit++;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic run_job(int m, int n, int stall, int wstall);
    stall_pct = stall;
    wstall_pct = wstall;
    for (int i = 0; i < m * ROWS; i++) u_mem.mem[A0 + i] = rand_elem();
    for (int i = 0; i < ROWS * n; i++) u_mem.mem[B0 + i] = rand_elem();
    for (int i = 0; i < m * n; i++)    u_mem.mem[C0 + i] = 32'hdeadbeef;
    job = '{a_base: A0, b_base: B0, c_base: C0, m: dim_t'(m), k: dim_t'(ROWS), n: dim_t'(n)};
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(posedge clk);
    @(negedge clk);
    check(!busy, "busy after done");
    for (int i = 0; i < m; i++)
      for (int j = 0; j < n; j++) begin
        logic [31:0] s;
        s = 32'h0;
        for (int r = 0; r < ROWS; r++)
          s = ref_add(ref_mul(u_mem.mem[A0 + i * ROWS + r], u_mem.mem[B0 + r * n + j]), s);
        check(same(u_mem.mem[C0 + i * n + j], s),
              $sformatf("C[%0d][%0d] = %h expected %h", i, j, u_mem.mem[C0 + i * n + j], s));
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
    run_job(5, 3, 0, 0);
    run_job(20, 9, 0, 0);
    run_job(1, 6, 40, 40);
    run_job(33, 6, 30, 30);
    run_job(40, 3, 0, 90);
    check(n_reload == 1 + 3 + 2 + 2 + 1, $sformatf("B strips loaded: %0d", n_reload));
    check(n_wait_data > 0, "rows waited for data");
    check(n_wait_credit > 0, "rows waited for result buffer room");
    check(u_mem.stalls > 0, "memory stalls exercised");
    check(u_mem.bad_addr == 0, "addresses in range");
    $display("reloads=%0d data_waits=%0d credit_waits=%0d mem_stalls=%0d",
             n_reload, n_wait_data, n_wait_credit, u_mem.stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
