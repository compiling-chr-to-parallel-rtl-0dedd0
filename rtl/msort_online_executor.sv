// Online merge sort: two executors joined by a one-way FIFO.
// Because constraints may be added to a CHR store at any time, the merge of
// arcs (rule M0) can run while rule M1 is still producing them. Executor 1
// (round-robin switch plus N/2 merge-sort PHBs) is loaded with the seq
// query. Between its rounds every valid arc in its store is moved out, one
// per clock, into the FIFO (the executor waits while the FIFO is full).
// Executor 2 starts with a store of invalid cells; between its rounds it
// takes FIFO entries, one per clock, into its first invalid cells. Executor 2
// may not finish while executor 1 is running or the FIFO holds arcs.
// Both stores and the FIFO have N entries. Result: `arcs` (executor 2's
// store) holds the sorted chain, `seqs` (executor 1's store) the chain head.
// Interface: pulse `start` with `query`; `done` stays high until next start.
// `rounds1/2` count rounds, `arcs_moved` counts FIFO transfers and
// `fifo_full_waits` counts clocks executor 1 waited on a full FIFO and
// `fifo_peak` is the highest FIFO occupancy seen.
// The split into two executors and the FIFO follow the online-optimisation
// scheme; the transfer timing (between rounds, first invalid cell) is this
// design's choice.
module msort_online_executor
  import chr_pkg::*;
#(
  parameter int N = 128
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  ms_c_t query [N],
  output logic  busy,
  output logic  done,
  output ms_c_t seqs  [N],
  output ms_c_t arcs  [N],
  output logic [31:0] rounds1,
  output logic [31:0] rounds2,
  output logic [31:0] arcs_moved,
  output logic [31:0] fifo_full_waits,
  output logic [$clog2(N):0] fifo_peak
);
  localparam int P  = N / 2;
  localparam int CW = $bits(ms_c_t);
  localparam int AW = (N > 1) ? $clog2(N) : 1;

  logic [CW-1:0] q1 [N], q2 [N], c1 [N], c2 [N];
  logic [CW-1:0] pa1 [P], pb1 [P], ra1 [P], rb1 [P];
  logic [CW-1:0] pa2 [P], pb2 [P], ra2 [P], rb2 [P];
  logic [P-1:0]  fin1, chg1, fin2, chg2;
  logic          ld1, ld2, busy1, busy2, done1, done2, xfer1, xfer2;

  // export side (executor 1 -> FIFO)
  logic          exp_found, exp_go;
  logic [AW-1:0] exp_idx;
  ms_c_t         exp_cell;
  // import side (FIFO -> executor 2)
  logic          imp_found, imp_go;
  logic [AW-1:0] imp_idx;
  logic [CW-1:0] f_head;
  logic          f_full, f_empty;
  logic [AW:0]   f_count;

  always_comb for (int i = 0; i < N; i++) begin
    q1[i]   = query[i];
    q2[i]   = '0;
    seqs[i] = c1[i];
    arcs[i] = c2[i];
  end

  // first valid arc in executor 1's store
  always_comb begin
    exp_found = 1'b0;
    exp_idx   = '0;
    for (int i = N - 1; i >= 0; i--) begin
      // valid is bit CW-1, kind bit CW-2
      if (c1[i][CW-1] && c1[i][CW-2] == MS_ARC) begin
        exp_found = 1'b1;
        exp_idx   = AW'(i);
      end
    end
    exp_cell       = ms_c_t'(c1[exp_idx]);
    exp_cell.valid = 1'b0;
  end
  assign exp_go = xfer1 && exp_found && !f_full;

  // first invalid cell in executor 2's store
  always_comb begin
    imp_found = 1'b0;
    imp_idx   = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (!c2[i][CW-1]) begin
        imp_found = 1'b1;
        imp_idx   = AW'(i);
      end
    end
  end
  assign imp_go = xfer2 && imp_found && !f_empty;

  chr_cs #(.CW(CW), .N(N)) u_cs1 (
    .clk, .rst_n, .start, .query(q1), .busy(busy1), .done(done1), .cells(c1), .rounds(rounds1),
    .phb_load(ld1), .phb_a(pa1), .phb_b(pb1), .res_a(ra1), .res_b(rb1),
    .phb_finish(fin1), .phb_changed(chg1),
    .xfer(xfer1), .xfer_busy(exp_found), .wr_en(exp_go), .wr_idx(exp_idx),
    .wr_data(CW'(exp_cell)), .ext_hold(1'b0)
  );

  chr_fifo #(.CW(CW), .DEPTH(N)) u_fifo (
    .clk, .rst_n, .push(exp_go), .wr_data(c1[exp_idx] | {1'b1, {(CW-1){1'b0}}}),
    .pop(imp_go), .rd_data(f_head), .full(f_full), .empty(f_empty), .count(f_count)
  );

  chr_cs #(.CW(CW), .N(N)) u_cs2 (
    .clk, .rst_n, .start, .query(q2), .busy(busy2), .done(done2), .cells(c2), .rounds(rounds2),
    .phb_load(ld2), .phb_a(pa2), .phb_b(pb2), .res_a(ra2), .res_b(rb2),
    .phb_finish(fin2), .phb_changed(chg2),
    .xfer(xfer2), .xfer_busy(imp_found && !f_empty), .wr_en(imp_go), .wr_idx(imp_idx),
    .wr_data(f_head), .ext_hold(!done1 || !f_empty)
  );

  for (genvar i = 0; i < P; i++) begin : g_phb
    ms_c_t oa1, ob1, oa2, ob2;
    phb_msort u_phb1 (
      .clk, .rst_n, .load(ld1), .in_a(ms_c_t'(pa1[i])), .in_b(ms_c_t'(pb1[i])),
      .out_a(oa1), .out_b(ob1), .finish(fin1[i]), .changed(chg1[i])
    );
    phb_msort u_phb2 (
      .clk, .rst_n, .load(ld2), .in_a(ms_c_t'(pa2[i])), .in_b(ms_c_t'(pb2[i])),
      .out_a(oa2), .out_b(ob2), .finish(fin2[i]), .changed(chg2[i])
    );
    assign ra1[i] = oa1;
    assign rb1[i] = ob1;
    assign ra2[i] = oa2;
    assign rb2[i] = ob2;
  end

  assign busy = busy1 || busy2;
  assign done = done1 && done2;

  always_ff @(posedge clk) begin
    if (!rst_n || start) begin
      arcs_moved      <= '0;
      fifo_full_waits <= '0;
      fifo_peak       <= '0;
    end else begin
      if (f_count > fifo_peak) fifo_peak <= f_count;
      if (exp_go) arcs_moved <= arcs_moved + 1;
      if (xfer1 && exp_found && f_full) fifo_full_waits <= fifo_full_waits + 1;
    end
  end
endmodule
