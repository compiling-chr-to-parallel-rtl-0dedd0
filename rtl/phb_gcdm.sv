// Program hardware block for the accelerated part of the gcd-matrix program:
//   GCD0 @ gcd(_,_,0) <=> true.
//   GCD1 @ gcd(X,Y,N) \ gcd(X,Y,M) <=> M>=N | gcd(X,Y,M-N).
// Like the gcd PHB, but both constraints must carry the same matrix position
// (X,Y) for GCD1 to apply. Two GCD0 blocks (one per input) and two GCD1
// blocks (both orders) evaluate each clock; the commit stage applies the
// GCD0 removals together, otherwise the first firing GCD1 copy. GCD1 only
// counts as firing when N /= 0, so it always makes progress.
// Handshake as for the other PHBs: `load` captures the inputs, `finish` rises
// one clock after a step that changed nothing, `changed` tells whether a rule
// fired since the load (this design's choice).
module phb_gcdm
  import chr_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  load,
  input  gm_c_t in_a,
  input  gm_c_t in_b,
  output gm_c_t out_a,
  output gm_c_t out_b,
  output logic  finish,
  output logic  changed
);
  gm_c_t a_q, b_q, a_d, b_d;
  logic  f0a, f0b, f1ab, f1ba, fired;

  // rule blocks (guards)
  function automatic logic gcd0(input logic valid, input logic [GM_W-1:0] n);
    return valid && n == '0;
  endfunction
  function automatic logic gcd1(input gm_c_t n, input gm_c_t m);
    return n.valid && m.valid && n.x == m.x && n.y == m.y && m.n >= n.n && n.n != '0;
  endfunction

  assign f0a  = gcd0(a_q.valid, a_q.n);
  assign f0b  = gcd0(b_q.valid, b_q.n);
  assign f1ab = gcd1(a_q, b_q);
  assign f1ba = gcd1(b_q, a_q);

  // commit stage
  always_comb begin
    a_d   = a_q;
    b_d   = b_q;
    fired = 1'b1;
    if (f0a || f0b) begin
      if (f0a) a_d.valid = 1'b0;
      if (f0b) b_d.valid = 1'b0;
    end else if (f1ab) begin
      b_d.n = b_q.n - a_q.n;
    end else if (f1ba) begin
      a_d.n = a_q.n - b_q.n;
    end else begin
      fired = 1'b0;
    end
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
