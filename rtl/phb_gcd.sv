// Program hardware block of the gcd program (rules R0 and R1).
// It holds two gcd constraints in registers. Because both head constraints of
// R1 have the same type, R1 is instantiated twice (both argument orders), and
// R0 twice (one per input). Every clock all four rule blocks evaluate the
// current state; a commit stage keeps a set of firings that cannot rewrite the
// same constraint: the two R0 copies together (they remove different
// constraints), otherwise the first R1 copy, otherwise the second. R0 and R1
// are never committed in the same cycle.
// Interface: `load` (one-cycle pulse) captures in_a/in_b; the state is then
// rewritten once per clock. `finish` rises one clock after a step that left
// the outputs unchanged (outputs equal over two consecutive cycles) and stays
// high until the next load. `changed` records whether any rule fired since the
// load. The rule set and the finish criterion follow the CHR-to-hardware
// scheme; the load/changed handshake and the commit priority are this
// design's choice.
module phb_gcd
  import chr_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   load,
  input  gcd_c_t in_a,
  input  gcd_c_t in_b,
  output gcd_c_t out_a,
  output gcd_c_t out_b,
  output logic   finish,
  output logic   changed
);
  gcd_c_t a_q, b_q, a_d, b_d;
  gcd_c_t r0a, r0b, r1ab_n, r1ab_m, r1ba_n, r1ba_m;
  logic   f0a, f0b, f1ab, f1ba, fired;

  rhb_gcd_r0 u_r0_a  (.c_in(a_q), .c_out(r0a), .fire(f0a));
  rhb_gcd_r0 u_r0_b  (.c_in(b_q), .c_out(r0b), .fire(f0b));
  rhb_gcd_r1 u_r1_ab (.n_in(a_q), .m_in(b_q), .n_out(r1ab_n), .m_out(r1ab_m), .fire(f1ab));
  rhb_gcd_r1 u_r1_ba (.n_in(b_q), .m_in(a_q), .n_out(r1ba_n), .m_out(r1ba_m), .fire(f1ba));

  // Commit stage
  always_comb begin
    a_d   = a_q;
    b_d   = b_q;
    fired = 1'b1;
    if (f0a || f0b) begin
      if (f0a) a_d = r0a;
      if (f0b) b_d = r0b;
    end else if (f1ab) begin
      a_d = r1ab_n;
      b_d = r1ab_m;
    end else if (f1ba) begin
      a_d = r1ba_m;
      b_d = r1ba_n;
    end else begin
      fired = 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_q     <= '0;
      b_q     <= '0;
      finish  <= 1'b0;
      changed <= 1'b0;
    end else if (load) begin
      a_q     <= in_a;
      b_q     <= in_b;
      finish  <= 1'b0;
      changed <= 1'b0;
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
