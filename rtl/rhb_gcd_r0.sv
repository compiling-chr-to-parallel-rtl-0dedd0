// Rule hardware block for gcd rule R0:  gcd(N) <=> N = 0 | true.
// Combinational. The guard compares the value with zero; when it holds the
// constraint is removed by clearing its valid bit, the value passes through
// unchanged. `fire` reports that the rule applied (a valid zero was seen).
// The register that makes the rule a clocked step sits in the enclosing PHB.
module rhb_gcd_r0
  import chr_pkg::*;
(
  input  gcd_c_t c_in,
  output gcd_c_t c_out,
  output logic   fire
);
  always_comb begin
    c_out = c_in;
    fire  = c_in.valid && (c_in.n == '0);
    if (fire) c_out.valid = 1'b0;
  end
endmodule
