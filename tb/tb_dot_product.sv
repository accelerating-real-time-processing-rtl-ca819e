// tb_dot_product: feeds an 8-wide dot-product unit a random vector pair
// every cycle, with gaps, and checks each result against a tree-ordered
// reference, its tag, and its latency of 1 + log2(8) = 4 cycles.
module tb_dot_product;
  import mm_pkg::*;
  import fp_ref_pkg::*;
  import mm_ref_pkg::*;
  localparam int unsigned N = 8, LAT = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, out_valid;
  fp32_t [N-1:0] a, b;
  fp32_t sum;
  logic [7:0] in_tag, out_tag;
  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { logic [31:0] y; logic [7:0] tag; longint t; } exp_t;
  exp_t expq[$];

  dot_product #(.N(N), .TAG_W(8)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (expq.size() == 0) check(0, "unexpected output");
      else begin
        exp_t e;
        e = expq.pop_front();
        check(same(sum, e.y), $sformatf("sum %h expected %h", sum, e.y));
        check(out_tag == e.tag, "tag");
        check(cycle - e.t == LAT, $sformatf("latency %0d", cycle - e.t));
      end
    end
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; a = '0; b = '0; in_tag = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] av[], bv[];
      @(negedge clk);
      in_valid = ($urandom_range(99, 0) < 80);
      av = new[N];
      bv = new[N];
      for (int j = 0; j < N; j++) begin
        av[j] = rand_f32(20);
        bv[j] = rand_f32(20);
        a[j] = av[j];
        b[j] = bv[j];
      end
      in_tag = 8'(i);
      if (in_valid) expq.push_back('{ref_dot_tree(av, bv), 8'(i), cycle});
    end
    @(negedge clk);
    in_valid = 0;
    repeat (LAT + 2) @(posedge clk);
    check(expq.size() == 0, "all results delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
