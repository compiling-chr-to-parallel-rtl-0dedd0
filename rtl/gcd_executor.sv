// gcd executor: computes the greatest common divisor of up to N integers by
// running the CHR program  R0 @ gcd(N) <=> N=0 | true,
//                          R1 @ gcd(N) \ gcd(M) <=> M>=N | gcd(M-N)
// on a round-robin Combinatorial Switch with N/2 gcd PHBs (128 constraints and
// 64 PHBs by default, 16-bit values). Query cells with valid=0 are empty
// slots. After `done`, exactly one valid cell holds the gcd of the non-zero
// inputs (all cells are invalid if every input was zero).
// Interface: pulse `start` with `query` applied; `done` stays high until the
// next start; `rounds` counts switch rounds for performance measurements.
module gcd_executor
  import chr_pkg::*;
#(
  parameter int N = 128
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  gcd_c_t query  [N],
  output logic   busy,
  output logic   done,
  output gcd_c_t result [N],
  output logic [31:0] rounds
);
  localparam int P  = N / 2;
  localparam int CW = $bits(gcd_c_t);

  logic [CW-1:0] q_bits [N], c_bits [N];
  logic [CW-1:0] pa [P], pb [P], ra [P], rb [P];
  logic [P-1:0]  fin, chg;
  logic          ld, xfer_unused;

  always_comb for (int i = 0; i < N; i++) begin
    q_bits[i] = query[i];
    result[i] = c_bits[i];
  end

  chr_cs #(.CW(CW), .N(N)) u_cs (
    .clk, .rst_n, .start, .query(q_bits), .busy, .done, .cells(c_bits), .rounds,
    .phb_load(ld), .phb_a(pa), .phb_b(pb), .res_a(ra), .res_b(rb),
    .phb_finish(fin), .phb_changed(chg),
    .xfer(xfer_unused), .xfer_busy(1'b0), .wr_en(1'b0), .wr_idx('0), .wr_data('0),
    .ext_hold(1'b0)
  );

  for (genvar i = 0; i < P; i++) begin : g_phb
    gcd_c_t oa, ob;
    phb_gcd u_phb (
      .clk, .rst_n, .load(ld), .in_a(gcd_c_t'(pa[i])), .in_b(gcd_c_t'(pb[i])),
      .out_a(oa), .out_b(ob), .finish(fin[i]), .changed(chg[i])
    );
    assign ra[i] = oa;
    assign rb[i] = ob;
  end
endmodule
