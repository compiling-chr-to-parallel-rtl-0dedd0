// Rule hardware block of the flattened merge sort (c/3 constraints).
//   RULE_M0:  c(0,X,A) \ c(0,X,B) <=> A<B | c(0,A,B).
//   RULE_M1:  c(1,N,A),  c(1,N,B) <=> A<B | c(1,N+N,A), c(0,A,B).
// Kind 0 is arc/2, kind 1 is seq/2. M0 merges two arcs leaving the same
// node: the shorter arc is kept and the other becomes the arc between the
// two targets. M1 joins two chains of equal length N: the chain head with
// the smaller value gets length 2N and an arc links it to the other head.
// Combinational; `a` is the first head constraint, `b` the second; `fire`
// reports that the guard held on two valid constraints of the right kind.
module rhb_msort
  import chr_pkg::*;
#(
  parameter ms_rule_e RULE = RULE_M0
) (
  input  ms_c_t a_in,
  input  ms_c_t b_in,
  output ms_c_t a_out,
  output ms_c_t b_out,
  output logic  fire
);
  ms_kind_e kind;
  assign kind = (RULE == RULE_M0) ? MS_ARC : MS_SEQ;

  always_comb begin
    a_out = a_in;
    b_out = b_in;
    fire  = a_in.valid && b_in.valid && (a_in.kind == kind) && (b_in.kind == kind)
            && (a_in.x == b_in.x) && (a_in.y < b_in.y);
    if (fire) begin
      if (RULE == RULE_M1) a_out.x = a_in.x + a_in.x;   // seq(N+N, A)
      b_out.kind = MS_ARC;                               // arc(A, B)
      b_out.x    = a_in.y;
      b_out.y    = b_in.y;
    end
  end
endmodule
