// Self-checking test of the strong-parallel gcd PHB. For random read value N
// and removed value M the PHB must leave the read constraint untouched and
// reduce M to M mod N by repeated subtraction, removing it if that is zero.
// Latency: finish is high (firings + 2) clock edges after load is raised,
// with firings = floor(M/N) subtractions plus one removal if N divides M.
module tb_phb_gcd_sp;
  import chr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0, finish, changed;
  gcd_c_t in_read, in_rem, out_read, out_rem;

  phb_gcd_sp dut (.*);
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
    for (int t = 0; t < 300; t++) begin
      int n, m, fires, cyc;
      logic vn, vm, exp_v;
      n  = $urandom_range(1, 60);
      m  = (t % 4 == 0) ? n * $urandom_range(0, 5) : $urandom_range(0, 400);
      vn = (t % 9 != 4);
      vm = (t % 9 != 5);
      if (!vm)              begin fires = 0; exp_v = 0; end
      else if (m == 0)      begin fires = 1; exp_v = 0; end
      else if (!vn)         begin fires = 0; exp_v = 1; end
      else begin
        fires = m / n + ((m % n == 0) ? 1 : 0);
        exp_v = (m % n != 0);
      end
      @(negedge clk);
      in_read = '{valid: vn, n: 16'(n)};
      in_rem  = '{valid: vm, n: 16'(m)};
      load = 1;
      @(negedge clk) load = 0;
      cyc = 1;
      while (!finish) begin @(negedge clk); cyc++; end
      check(cyc == fires + 2, $sformatf("latency %0d expected %0d (n=%0d m=%0d)", cyc, fires + 2, n, m));
      check(out_read == in_read, "read constraint unchanged");
      check(out_rem.valid == exp_v, $sformatf("removed valid (n=%0d m=%0d)", n, m));
      if (exp_v && vn) check(out_rem.n == 16'(m % n), "M mod N");
      check(changed == (fires != 0), "changed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
