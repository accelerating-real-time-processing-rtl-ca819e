// tb_sync_fifo: drives the FIFO with random pushes and pops (never pushing
// when full nor popping when empty) and compares the head, count and flags
// with a queue kept by the testbench.
module tb_sync_fifo;
  localparam int unsigned DEPTH = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push, pop, empty, full;
  logic [15:0] din, dout;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic [15:0] q[$];
  int checks = 0, failures = 0;
  int n_full = 0, n_both = 0;

  sync_fifo #(.WIDTH(16), .DEPTH(DEPTH)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; din = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      check(count == q.size(), $sformatf("count %0d vs %0d", count, q.size()));
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() == DEPTH), "full flag");
      if (q.size() > 0) check(dout == q[0], $sformatf("head %h vs %h", dout, q[0]));
      // Phases biased towards filling, then towards draining.
      push = (q.size() < DEPTH) && ($urandom_range(99, 0) < (((i / 200) % 2) ? 30 : 70));
      pop  = (q.size() > 0)     && ($urandom_range(99, 0) < (((i / 200) % 2) ? 70 : 30));
      din  = 16'($urandom);
      if (q.size() == DEPTH) n_full++;
      if (push && pop) n_both++;
      @(posedge clk);
      #1;
      if (pop)  void'(q.pop_front());
      if (push) q.push_back(din);
    end
    check(n_full > 0, "FIFO reached full");
    check(n_both > 0, "push and pop in one cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
