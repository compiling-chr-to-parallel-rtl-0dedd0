// Self-checking test of the Prime PHB: a load with (X, Y) must finish two
// clock edges after load when the rule does not apply and three when it
// does, with Y removed exactly when X divides Y and X kept unchanged.
module tb_phb_prime;
  import chr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0, finish, changed;
  prime_c_t in_read, in_rem, out_read, out_rem;

  phb_prime dut (.*);
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
    for (int t = 0; t < 400; t++) begin
      int x, y, cyc;
      logic e;
      x = $urandom_range(2, 50);
      y = (t % 3 == 0) ? x * $urandom_range(1, 9) : $urandom_range(2, 500);
      e = (y % x == 0) && (t % 17 != 0);
      @(negedge clk);
      in_read = '{valid: 1'b1, n: 16'(x)};
      in_rem  = '{valid: (t % 17 != 0), n: 16'(y)};
      load = 1;
      @(negedge clk) load = 0;
      cyc = 1;
      while (!finish) begin @(negedge clk); cyc++; end
      check(cyc == (e ? 3 : 2), $sformatf("latency %0d", cyc));
      check(out_rem.valid == (in_rem.valid && !e), $sformatf("removal x=%0d y=%0d", x, y));
      check(out_read == in_read && out_rem.n == 16'(y), "values kept");
      check(changed == e, "changed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
