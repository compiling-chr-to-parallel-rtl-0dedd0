// Strong-parallel prime executor: a shift-register switch of N cells drives
// N-1 phb_prime blocks; the constraint in cell 0 is the read constraint of every
// PHB, the others are the removed constraints (N = 128 by default).
// Interface: pulse `start` with `query` (cells with valid=0 are empty);
// `done` stays high until the next start and `result` holds the store.
// `rounds`/`shifts` count switch rounds and single-place shifts.
module prime_sp_executor
  import chr_pkg::*;
#(
  parameter int N = 128
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  prime_c_t query  [N],
  output logic     busy,
  output logic     done,
  output prime_c_t result [N],
  output logic [31:0] rounds,
  output logic [31:0] shifts
);
  localparam int P  = N - 1;
  localparam int CW = $bits(prime_c_t);

  logic [CW-1:0] q_bits [N], c_bits [N];
  logic [CW-1:0] rd, rem [P], res [P];
  logic [P-1:0]  fin, chg;
  logic          ld;

  always_comb for (int i = 0; i < N; i++) begin
    q_bits[i] = query[i];
    result[i] = c_bits[i];
  end

  chr_sp_switch #(.CW(CW), .N(N)) u_sw (
    .clk, .rst_n, .start, .query(q_bits), .busy, .done, .cells(c_bits),
    .rounds, .shifts, .phb_load(ld), .phb_read(rd), .phb_rem(rem),
    .res_rem(res), .phb_finish(fin), .phb_changed(chg)
  );

  // Only PHB 0 returns the read constraint (the switch leaves cell 0 alone);
  // the others leave that output open.
  for (genvar i = 0; i < P; i++) begin : g_phb
    prime_c_t o_rem;
    phb_prime u_phb (
      .clk, .rst_n, .load(ld), .in_read(prime_c_t'(rd)), .in_rem(prime_c_t'(rem[i])),
      .out_read(), .out_rem(o_rem), .finish(fin[i]), .changed(chg[i])
    );
    assign res[i] = o_rem;
  end
endmodule
