// tb_fp32_add: checks the single-precision adder against a reference
// computed in double precision: random operands of both signs with close
// and distant exponents (cancellation, long alignment shifts, sticky bits),
// zeros, infinities and NaN.
module tb_fp32_add;
  import fp_ref_pkg::*;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  fp32_add dut (.a(a), .b(b), .y(y));

  task automatic check(logic [31:0] ta, logic [31:0] tb_, logic [31:0] exp_y);
    a = ta; b = tb_;
    #1;
    checks++;
    if (!same(y, exp_y)) begin
      failures++;
      if (failures < 10) $display("FAIL add %h + %h = %h, expected %h", ta, tb_, y, exp_y);
    end
  endtask

  initial begin
    #100000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      logic [31:0] ra, rb;
      ra = rand_f32(40);
      rb = rand_f32(40);
      check(ra, rb, ref_add(ra, rb));
    end
    // Close exponents: heavy cancellation and ties.
    for (int i = 0; i < 20000; i++) begin
      logic [31:0] ra, rb;
      ra = rand_f32(2);
      rb = rand_f32(2);
      if (i % 3 == 0) rb[22:8] = ra[22:8];
      check(ra, rb, ref_add(ra, rb));
    end
    check(32'h3f800000, 32'h3f800000, 32'h40000000);   // 1 + 1
    check(32'h3f800000, 32'hbf800000, 32'h00000000);   // 1 - 1
    check(32'h4b800000, 32'h3f800000, 32'h4b800000);   // 2^24 + 1, tie to even
    check(32'h4b800000, 32'h40400000, 32'h4b800002);   // 2^24 + 3, tie rounds up
    check(32'h00000000, 32'hc0400000, 32'hc0400000);
    check(32'h7f800000, 32'hff800000, 32'h7fc00000);   // inf - inf
    check(32'h7f7fffff, 32'h7f7fffff, 32'h7f800000);   // overflow
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
