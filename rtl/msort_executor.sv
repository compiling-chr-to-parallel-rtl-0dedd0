// Merge-sort executor: a round-robin Combinatorial Switch with N/2 merge-sort
// PHBs runs the flattened merge sort on N c/3 constraints (N = 128 default).
// Load the query seq(1,v) as {valid=1, kind=MS_SEQ, x=1, y=v}; unused cells
// have valid=0. At `done` the store holds the arcs arc(a,b) of the sorted
// chain plus the one seq constraint left unpaired (the chain head).
// Interface: pulse `start` with `query`; `done` stays high until the next
// start; `rounds` counts switch rounds.
module msort_executor
  import chr_pkg::*;
#(
  parameter int N = 128
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  ms_c_t query  [N],
  output logic  busy,
  output logic  done,
  output ms_c_t result [N],
  output logic [31:0] rounds
);
  localparam int P  = N / 2;
  localparam int CW = $bits(ms_c_t);

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
    ms_c_t oa, ob;
    phb_msort u_phb (
      .clk, .rst_n, .load(ld), .in_a(ms_c_t'(pa[i])), .in_b(ms_c_t'(pb[i])),
      .out_a(oa), .out_b(ob), .finish(fin[i]), .changed(chg[i])
    );
    assign ra[i] = oa;
    assign rb[i] = ob;
  end
endmodule
