// tb_fp32_mul: checks the single-precision multiplier against a reference
// computed in double precision: random normal operands over a wide exponent
// range, operands with few significand bits (exact products, ties), zeros,
// infinities, NaN, overflow to infinity and flush of tiny results.
module tb_fp32_mul;
  import fp_ref_pkg::*;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  fp32_mul dut (.a(a), .b(b), .y(y));

  task automatic check(logic [31:0] ta, logic [31:0] tb_, logic [31:0] exp_y);
    a = ta; b = tb_;
    #1;
    checks++;
    if (!same(y, exp_y)) begin
      failures++;
      if (failures < 10) $display("FAIL mul %h * %h = %h, expected %h", ta, tb_, y, exp_y);
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
      ra = rand_f32(60);
      rb = rand_f32(60);
      check(ra, rb, ref_mul(ra, rb));
    end
    // Short significands give exact products and rounding ties.
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] ra, rb;
      ra = rand_f32(10); ra[10:0] = '0;
      rb = rand_f32(10); rb[12:0] = '0;
      check(ra, rb, ref_mul(ra, rb));
    end
    check(32'h3f800000, 32'h40000000, 32'h40000000);   // 1 * 2
    check(32'hbfc00000, 32'h40400000, 32'hc0900000);   // -1.5 * 3 = -4.5
    check(32'h00000000, 32'h40400000, 32'h00000000);
    check(32'h7f800000, 32'h40400000, 32'h7f800000);   // inf * 3
    check(32'h7f800000, 32'h00000000, 32'h7fc00000);   // inf * 0 = NaN
    check(32'h7f000000, 32'h7f000000, 32'h7f800000);   // overflow
    check(32'h00800000, 32'h00800000, 32'h00000000);   // underflow flushes
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
