// Self-checking test of the gcd rule blocks R0 and R1 (combinational).
// Random and corner values are applied; expected outputs are computed here
// from the rule text: R0 removes a valid zero, R1 replaces M by M-N when both
// are valid, M >= N and N /= 0.
module tb_rhb_gcd;
  import chr_pkg::*;
  int checks = 0, failures = 0;
  gcd_c_t c_in, c_out, n_in, m_in, n_out, m_out;
  logic   f0, f1;

  rhb_gcd_r0 u_r0 (.c_in, .c_out, .fire(f0));
  rhb_gcd_r1 u_r1 (.n_in, .m_in, .n_out, .m_out, .fire(f1));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      logic [15:0] a, b;
      logic va, vb, exp_fire;
      a  = (t % 5 == 0) ? 16'd0 : 16'($urandom_range(0, 300));
      b  = (t % 7 == 0) ? a : 16'($urandom_range(0, 300));
      va = (t % 11 != 0);
      vb = (t % 13 != 0);
      c_in = '{valid: va, n: a};
      n_in = '{valid: va, n: a};
      m_in = '{valid: vb, n: b};
      #1;
      check(f0 == (va && a == 0), "R0 fire");
      check(c_out.n == a && c_out.valid == (va && a != 0), "R0 output");
      exp_fire = va && vb && b >= a && a != 0;
      check(f1 == exp_fire, "R1 fire");
      check(n_out == n_in, "R1 keeps N");
      check(m_out.valid == vb, "R1 keeps valid");
      check(m_out.n == (exp_fire ? b - a : b), "R1 value");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
