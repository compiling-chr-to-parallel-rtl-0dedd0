// gcd PHB for the strong-parallel switch.
// One R0 and one R1 block, no duplicates: the first input is the read
// constraint gcd(N) (never rewritten, so it is shared by all PHBs) and the
// second the removed constraint gcd(M). Every clock the commit stage applies
// R0 to M if M is a valid zero, otherwise R1 (M := M-N when M >= N). The
// handshake is that of the other PHBs: `load` captures the inputs, `finish`
// rises one clock after a step that changed nothing, `changed` tells whether
// any rule fired since the load. The split into read and removed inputs
// follows the strong-parallelism scheme; the handshake is this design's.
module phb_gcd_sp
  import chr_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   load,
  input  gcd_c_t in_read,
  input  gcd_c_t in_rem,
  output gcd_c_t out_read,
  output gcd_c_t out_rem,
  output logic   finish,
  output logic   changed
);
  gcd_c_t r_q, m_q, m_d, r0m, r1n, r1m;
  logic   f0, f1, fired;

  rhb_gcd_r0 u_r0 (.c_in(m_q), .c_out(r0m), .fire(f0));
  rhb_gcd_r1 u_r1 (.n_in(r_q), .m_in(m_q), .n_out(r1n), .m_out(r1m), .fire(f1));

  always_comb begin
    fired = f0 || f1;
    if (f0)      m_d = r0m;
    else if (f1) m_d = r1m;
    else         m_d = m_q;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r_q <= '0; m_q <= '0; finish <= 1'b0; changed <= 1'b0;
    end else if (load) begin
      r_q <= in_read; m_q <= in_rem; finish <= 1'b0; changed <= 1'b0;
    end else begin
      m_q     <= m_d;
      finish  <= !fired;
      changed <= changed || fired;
    end
  end

  assign out_read = r1n;
  assign out_rem  = m_q;
endmodule
