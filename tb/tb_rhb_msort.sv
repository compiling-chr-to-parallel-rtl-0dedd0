// Self-checking test of the merge-sort rule blocks M0 and M1 (both
// parameterisations). Random c/3 pairs with few distinct values (so that
// kinds and first arguments often match) are applied; the expected outputs
// follow the rule text:
//   M0: c(0,X,A) \ c(0,X,B) <=> A<B | c(0,A,B)
//   M1: c(1,N,A), c(1,N,B) <=> A<B | c(1,N+N,A), c(0,A,B)
module tb_rhb_msort;
  import chr_pkg::*;
  int checks = 0, failures = 0;
  ms_c_t a_in, b_in, a0, b0, a1, b1;
  logic f0, f1;

  rhb_msort #(.RULE(RULE_M0)) u_m0 (.a_in, .b_in, .a_out(a0), .b_out(b0), .fire(f0));
  rhb_msort #(.RULE(RULE_M1)) u_m1 (.a_in, .b_in, .a_out(a1), .b_out(b1), .fire(f1));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      logic e0, e1, match;
      a_in = '{valid: ($urandom_range(0, 5) != 0), kind: ms_kind_e'($urandom_range(0, 1)),
               x: 16'($urandom_range(1, 3)), y: 16'($urandom_range(0, 4))};
      b_in = '{valid: ($urandom_range(0, 5) != 0), kind: ms_kind_e'($urandom_range(0, 1)),
               x: 16'($urandom_range(1, 3)), y: 16'($urandom_range(0, 4))};
      #1;
      match = a_in.valid && b_in.valid && a_in.x == b_in.x && a_in.y < b_in.y;
      e0 = match && a_in.kind == MS_ARC && b_in.kind == MS_ARC;
      e1 = match && a_in.kind == MS_SEQ && b_in.kind == MS_SEQ;
      check(f0 == e0, "M0 fire");
      check(f1 == e1, "M1 fire");
      if (e0) check(a0 == a_in && b0 == '{valid: 1'b1, kind: MS_ARC, x: a_in.y, y: b_in.y}, "M0 result");
      else    check(a0 == a_in && b0 == b_in, "M0 idle");
      if (e1) check(a1 == '{valid: 1'b1, kind: MS_SEQ, x: 16'(2 * a_in.x), y: a_in.y}
                    && b1 == '{valid: 1'b1, kind: MS_ARC, x: a_in.y, y: b_in.y}, "M1 result");
      else    check(a1 == a_in && b1 == b_in, "M1 idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
