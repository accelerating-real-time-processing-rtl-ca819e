// tb_systolic_array: loads a 3 x 4 matrix B into a 3-row, 4-column array by
// shifting it up the columns and pulsing LD, streams vectors in with the
// diagonal skew, and checks that column c delivers sum_r x[r]*B[r][c]
// exactly ROWS + c cycles after the vector started. Then reloads a new B
// and repeats, checking that the stored matrix changed.
module tb_systolic_array;
  import mm_pkg::*;
  import fp_ref_pkg::*;
  localparam int unsigned ROWS = 3, COLS = 4, NV = 50;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  fp32_t [ROWS-1:0] a_in;
  fp32_t [COLS-1:0] b_in, s_out;
  logic ld;
  int checks = 0, failures = 0;
  logic [31:0] bm [ROWS][COLS];
  logic [31:0] xv [NV][ROWS];

  systolic_array #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic load_b();
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) bm[r][c] = rand_f32(6);
    // Row 0 enters first: it has the furthest to go.
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk);
      for (int c = 0; c < COLS; c++) b_in[c] = bm[r][c];
    end
    @(negedge clk);
    b_in = '0;
    ld = 1;
    @(negedge clk);
    ld = 0;
  endtask

  // Vector v row r enters at cycle t0 + v + r; column c result is visible
  // during cycle t0 + v + ROWS + c.
  task automatic stream();
    for (int v = 0; v < NV; v++)
      for (int r = 0; r < ROWS; r++) xv[v][r] = rand_f32(6);
    for (int t = 0; t < NV + ROWS + COLS + 1; t++) begin
      for (int r = 0; r < ROWS; r++)
        a_in[r] = (t - r >= 0 && t - r < NV) ? xv[t - r][r] : 32'h0;
      for (int c = 0; c < COLS; c++) begin
        int v;
        v = t - ROWS - c;
        if (v >= 0 && v < NV) begin
          logic [31:0] s;
          s = 32'h0;
          for (int r = 0; r < ROWS; r++) s = ref_add(ref_mul(xv[v][r], bm[r][c]), s);
          check(same(s_out[c], s), $sformatf("vec %0d col %0d: %h expected %h", v, c, s_out[c], s));
        end
      end
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_in = '0; b_in = '0; ld = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    load_b();
    stream();
    load_b();
    stream();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
