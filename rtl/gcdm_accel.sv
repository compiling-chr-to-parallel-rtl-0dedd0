// gcd-matrix accelerator: runs rules GCD0 and GCD1 of the gcd-matrix program
// on the gcd(X,Y,N) constraints the host produces (one-byte values). The host
// keeps the propagation rules that build the matrix and calls the
// accelerator with the packed list of gcd/3 constraints; it gets back one
// gcd(X,Y,G) per matrix position.
// Structure: host interface (word-serial load, start, packed unload), a
// round-robin Combinatorial Switch of N cells and N/2 PHBs (N = 128).
// Interface: see chr_host_if; `rounds` counts switch rounds of the last run.
module gcdm_accel
  import chr_pkg::*;
#(
  parameter int N = 128
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  gm_c_t in_data,
  output logic  in_ready,
  input  logic  go,
  output logic  out_valid,
  output gm_c_t out_data,
  output logic  out_last,
  input  logic  out_ready,
  output logic  running,
  output logic [$clog2(N):0] result_count,
  output logic [31:0] rounds
);
  localparam int P  = N / 2;
  localparam int CW = $bits(gm_c_t);

  logic [CW-1:0] q_bits [N], c_bits [N], od;
  logic [CW-1:0] pa [P], pb [P], ra [P], rb [P];
  logic [P-1:0]  fin, chg;
  logic          ld, ex_start, ex_done, ex_busy, xfer_unused;

  chr_host_if #(.CW(CW), .N(N)) u_if (
    .clk, .rst_n, .in_valid, .in_data(CW'(in_data)), .in_ready, .go,
    .out_valid, .out_data(od), .out_last, .out_ready, .running, .result_count,
    .ex_start, .ex_query(q_bits), .ex_done, .ex_cells(c_bits)
  );
  assign out_data = gm_c_t'(od);

  chr_cs #(.CW(CW), .N(N)) u_cs (
    .clk, .rst_n, .start(ex_start), .query(q_bits), .busy(ex_busy), .done(ex_done),
    .cells(c_bits), .rounds,
    .phb_load(ld), .phb_a(pa), .phb_b(pb), .res_a(ra), .res_b(rb),
    .phb_finish(fin), .phb_changed(chg),
    .xfer(xfer_unused), .xfer_busy(1'b0), .wr_en(1'b0), .wr_idx('0), .wr_data('0),
    .ext_hold(1'b0)
  );

  for (genvar i = 0; i < P; i++) begin : g_phb
    gm_c_t oa, ob;
    phb_gcdm u_phb (
      .clk, .rst_n, .load(ld), .in_a(gm_c_t'(pa[i])), .in_b(gm_c_t'(pb[i])),
      .out_a(oa), .out_b(ob), .finish(fin[i]), .changed(chg[i])
    );
    assign ra[i] = oa;
    assign rb[i] = ob;
  end
endmodule
