// Rule hardware block for gcd rule R1:  gcd(N) \ gcd(M) <=> M >= N | gcd(M-N).
// Combinational. A comparator checks the guard on two valid constraints and a
// subtractor computes Z = M - N; when the guard holds the second constraint
// takes Z, the first is kept unchanged, and valid bits are never touched.
// `fire` is raised only when the rewrite changes something (N /= 0), so that
// a zero read constraint cannot keep the rule applying forever.
module rhb_gcd_r1
  import chr_pkg::*;
(
  input  gcd_c_t n_in,   // kept constraint gcd(N)
  input  gcd_c_t m_in,   // rewritten constraint gcd(M)
  output gcd_c_t n_out,
  output gcd_c_t m_out,
  output logic   fire
);
  always_comb begin
    n_out = n_in;
    m_out = m_in;
    fire  = n_in.valid && m_in.valid && (m_in.n >= n_in.n) && (n_in.n != '0);
    if (fire) m_out.n = m_in.n - n_in.n;
  end
endmodule
