// tb_systolic_pe: checks one arithmetic unit cycle by cycle against a
// model of its four registers: A passes to An after one cycle, B passes to
// Bn after one cycle, LD copies the shifted B into the held operand, and Sn
// is S + A * (held B) one cycle later.
module tb_systolic_pe;
  import mm_pkg::*;
  import fp_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  fp32_t a_in, s_in, b_in, a_out, s_out, b_out;
  logic ld;
  fp32_t m_a, m_s, m_bs, m_bh;
  int checks = 0, failures = 0, n_ld = 0;

  systolic_pe dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_in = 0; s_in = 0; b_in = 0; ld = 0;
    m_a = 0; m_s = 0; m_bs = 0; m_bh = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      check(a_out == m_a, "An");
      check(same(s_out, m_s), $sformatf("Sn %h expected %h", s_out, m_s));
      check(b_out == m_bs, "Bn");
      a_in = rand_f32(20);
      s_in = rand_f32(20);
      b_in = rand_f32(20);
      ld   = ($urandom_range(99, 0) < 20);
      // Next register contents, from the model.
      m_s  = ref_add(ref_mul(a_in, m_bh), s_in);
      m_a  = a_in;
      if (ld) begin
        m_bh = m_bs;
        n_ld++;
      end
      m_bs = b_in;
    end
    check(n_ld > 0, "LD exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
