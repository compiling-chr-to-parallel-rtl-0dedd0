// Program hardware block for the accelerated rules of the interval solver:
//   Redundant @ X::A:B \ X::C:D <=> C=<A, B=<D | true.
//   Intersect @ X::A:B,  X::C:D <=> X::max(A,C):min(B,D).
// Variables are replaced by indexes, so V::Lo:Hi is {valid, v, lo, hi}.
// Redundant removes the wider of two intervals on the same variable when it
// contains the other; Intersect replaces two intervals on the same variable
// by their intersection (kept in the first input, the second is removed).
// Both rules are instantiated in both argument orders; the commit stage takes
// the first firing block in the order Redundant(a,b), Redundant(b,a),
// Intersect(a,b), Intersect(b,a) (rule order, this design's choice).
// Handshake as for the other PHBs: `load`, `finish` (one clock after a step
// that changed nothing), `changed` (a rule fired since the load).
module phb_interval
  import chr_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  load,
  input  iv_c_t in_a,
  input  iv_c_t in_b,
  output iv_c_t out_a,
  output iv_c_t out_b,
  output logic  finish,
  output logic  changed
);
  iv_c_t a_q, b_q, a_d, b_d;
  logic  fr_ab, fr_ba, fi_ab, fi_ba, fired;

  function automatic logic same_var(input iv_c_t k, input iv_c_t r);
    return k.valid && r.valid && k.v == r.v;
  endfunction
  // Redundant: k kept, r removed when k's interval lies inside r's
  function automatic logic redundant(input iv_c_t k, input iv_c_t r);
    return same_var(k, r) && r.lo <= k.lo && k.hi <= r.hi;
  endfunction
  function automatic iv_c_t iv_meet(input iv_c_t p, input iv_c_t q);
    iv_c_t o;
    o    = p;
    o.lo = (p.lo > q.lo) ? p.lo : q.lo;
    o.hi = (p.hi < q.hi) ? p.hi : q.hi;
    return o;
  endfunction

  assign fr_ab = redundant(a_q, b_q);
  assign fr_ba = redundant(b_q, a_q);
  assign fi_ab = same_var(a_q, b_q);
  assign fi_ba = same_var(b_q, a_q);

  always_comb begin
    a_d   = a_q;
    b_d   = b_q;
    fired = 1'b1;
    if (fr_ab)      b_d.valid = 1'b0;
    else if (fr_ba) a_d.valid = 1'b0;
    else if (fi_ab) begin
      a_d       = iv_meet(a_q, b_q);
      b_d.valid = 1'b0;
    end else if (fi_ba) begin
      b_d       = iv_meet(b_q, a_q);
      a_d.valid = 1'b0;
    end else fired = 1'b0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_q <= '0; b_q <= '0; finish <= 1'b0; changed <= 1'b0;
    end else if (load) begin
      a_q <= in_a; b_q <= in_b; finish <= 1'b0; changed <= 1'b0;
    end else begin
      a_q     <= a_d;
      b_q     <= b_d;
      finish  <= !fired;
      changed <= changed || fired;
    end
  end

  assign out_a = a_q;
  assign out_b = b_q;
endmodule
