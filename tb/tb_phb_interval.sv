// Self-checking test of the interval-solver PHB: two intervals on the same or
// on different variables. On the same variable one interval must survive and
// equal the intersection [max lo, min hi]; if one contained the other the
// contained one survives (Redundant) in one step, otherwise Intersect fires
// once. Different variables are left alone. Latency: 2 clock edges when
// nothing fires, 3 when one rule fires.
module tb_phb_interval;
  import chr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0, finish, changed;
  iv_c_t in_a, in_b, out_a, out_b;

  phb_interval dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 500; t++) begin
      int a, b, c, d, cyc;
      logic same;
      iv_c_t surv;
      a = $urandom_range(0, 30); b = a + $urandom_range(0, 30);
      c = $urandom_range(0, 30); d = c + $urandom_range(0, 30);
      same = (t % 5 != 0);
      in_a = '{1'b1, 8'd4, 16'(a), 16'(b)};
      in_b = '{1'b1, same ? 8'd4 : 8'd9, 16'(c), 16'(d)};
      @(negedge clk) load = 1;
      @(negedge clk) load = 0;
      cyc = 1;
      while (!finish) begin @(negedge clk); cyc++; end
      if (same) begin
        check(cyc == 3, $sformatf("latency %0d", cyc));
        check(out_a.valid != out_b.valid, "one survivor");
        surv = out_a.valid ? out_a : out_b;
        check(surv.v == 8'd4 && surv.lo == 16'((a > c) ? a : c) && surv.hi == 16'((b < d) ? b : d),
              $sformatf("intersection of [%0d,%0d] and [%0d,%0d]", a, b, c, d));
      end else begin
        check(cyc == 2 && out_a == in_a && out_b == in_b, "different variables untouched");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
