// Rule hardware block for  Prime @ prime(X) \ prime(Y) <=> Y mod X = 0 | true.
// Combinational. X is the read (kept) constraint and Y the removed one; when
// both are valid and X divides Y, Y's valid bit is cleared. X = 0 never fires
// (the sieve query starts at prime(2)). `fire` reports a removal.
module rhb_prime
  import chr_pkg::*;
(
  input  prime_c_t x_in,
  input  prime_c_t y_in,
  output prime_c_t y_out,
  output logic     fire
);
  always_comb begin
    y_out = y_in;
    fire  = x_in.valid && y_in.valid && (x_in.n != '0) && ((y_in.n % x_in.n) == '0);
    if (fire) y_out.valid = 1'b0;
  end
endmodule
