// Top level: the CHR programs compiled to parallel hardware, side by side.
//   gcd_*   gcd of up to N integers, round-robin switch + N/2 PHBs
//   gsp_*   the same program with the strong-parallel shift-register switch
//   psp_*   prime sieve, strong-parallel switch
//   pmp_*   prime sieve, massive parallelism (PMP_ROWS read constraints/step)
//   ms_*    merge sort, one executor
//   mso_*   merge sort, two executors joined by a FIFO (online optimisation)
//   gm_*    gcd-matrix accelerator with host interface
//   iv_*    interval-solver accelerator with host interface
// The designs share only clock and reset; each has its own start/done (or
// host handshake) and result ports. All store sizes default to 128
// constraints.
module chr_top
  import chr_pkg::*;
#(
  parameter int N        = 128,
  parameter int PMP_ROWS = 8
) (
  input  logic     clk,
  input  logic     rst_n,
  // gcd, round-robin switch
  input  logic     gcd_start,
  input  gcd_c_t   gcd_query  [N],
  output logic     gcd_busy,
  output logic     gcd_done,
  output gcd_c_t   gcd_result [N],
  output logic [31:0] gcd_rounds,
  // gcd, strong parallelism
  input  logic     gsp_start,
  input  gcd_c_t   gsp_query  [N],
  output logic     gsp_busy,
  output logic     gsp_done,
  output gcd_c_t   gsp_result [N],
  output logic [31:0] gsp_rounds,
  output logic [31:0] gsp_shifts,
  // prime sieve, strong parallelism
  input  logic     psp_start,
  input  prime_c_t psp_query  [N],
  output logic     psp_busy,
  output logic     psp_done,
  output prime_c_t psp_result [N],
  output logic [31:0] psp_rounds,
  output logic [31:0] psp_shifts,
  // prime sieve, massive parallelism
  input  logic     pmp_start,
  input  prime_c_t pmp_query  [N],
  output logic     pmp_busy,
  output logic     pmp_done,
  output prime_c_t pmp_result [N],
  output logic [31:0] pmp_steps,
  // merge sort
  input  logic     ms_start,
  input  ms_c_t    ms_query   [N],
  output logic     ms_busy,
  output logic     ms_done,
  output ms_c_t    ms_result  [N],
  output logic [31:0] ms_rounds,
  // merge sort, online (two executors + FIFO)
  input  logic     mso_start,
  input  ms_c_t    mso_query  [N],
  output logic     mso_busy,
  output logic     mso_done,
  output ms_c_t    mso_seqs   [N],
  output ms_c_t    mso_arcs   [N],
  output logic [31:0] mso_rounds1,
  output logic [31:0] mso_rounds2,
  output logic [31:0] mso_arcs_moved,
  output logic [31:0] mso_fifo_full_waits,
  output logic [$clog2(N):0] mso_fifo_peak,
  // gcd-matrix accelerator
  input  logic     gm_in_valid,
  input  gm_c_t    gm_in_data,
  output logic     gm_in_ready,
  input  logic     gm_go,
  output logic     gm_out_valid,
  output gm_c_t    gm_out_data,
  output logic     gm_out_last,
  input  logic     gm_out_ready,
  output logic     gm_running,
  output logic [$clog2(N):0] gm_result_count,
  output logic [31:0] gm_rounds,
  // interval-solver accelerator
  input  logic     iv_in_valid,
  input  iv_c_t    iv_in_data,
  output logic     iv_in_ready,
  input  logic     iv_go,
  output logic     iv_out_valid,
  output iv_c_t    iv_out_data,
  output logic     iv_out_last,
  input  logic     iv_out_ready,
  output logic     iv_running,
  output logic [$clog2(N):0] iv_result_count,
  output logic [31:0] iv_rounds
);
  gcd_executor #(.N(N)) u_gcd (
    .clk, .rst_n, .start(gcd_start), .query(gcd_query), .busy(gcd_busy),
    .done(gcd_done), .result(gcd_result), .rounds(gcd_rounds)
  );

  gcd_sp_executor #(.N(N)) u_gsp (
    .clk, .rst_n, .start(gsp_start), .query(gsp_query), .busy(gsp_busy),
    .done(gsp_done), .result(gsp_result), .rounds(gsp_rounds), .shifts(gsp_shifts)
  );

  prime_sp_executor #(.N(N)) u_psp (
    .clk, .rst_n, .start(psp_start), .query(psp_query), .busy(psp_busy),
    .done(psp_done), .result(psp_result), .rounds(psp_rounds), .shifts(psp_shifts)
  );

  prime_mp_executor #(.N(N), .ROWS(PMP_ROWS)) u_pmp (
    .clk, .rst_n, .start(pmp_start), .query(pmp_query), .busy(pmp_busy),
    .done(pmp_done), .result(pmp_result), .steps(pmp_steps)
  );

  msort_executor #(.N(N)) u_ms (
    .clk, .rst_n, .start(ms_start), .query(ms_query), .busy(ms_busy),
    .done(ms_done), .result(ms_result), .rounds(ms_rounds)
  );

  msort_online_executor #(.N(N)) u_mso (
    .clk, .rst_n, .start(mso_start), .query(mso_query), .busy(mso_busy),
    .done(mso_done), .seqs(mso_seqs), .arcs(mso_arcs), .rounds1(mso_rounds1),
    .rounds2(mso_rounds2), .arcs_moved(mso_arcs_moved),
    .fifo_full_waits(mso_fifo_full_waits), .fifo_peak(mso_fifo_peak)
  );

  gcdm_accel #(.N(N)) u_gm (
    .clk, .rst_n, .in_valid(gm_in_valid), .in_data(gm_in_data), .in_ready(gm_in_ready),
    .go(gm_go), .out_valid(gm_out_valid), .out_data(gm_out_data), .out_last(gm_out_last),
    .out_ready(gm_out_ready), .running(gm_running), .result_count(gm_result_count),
    .rounds(gm_rounds)
  );

  interval_accel #(.N(N)) u_iv (
    .clk, .rst_n, .in_valid(iv_in_valid), .in_data(iv_in_data), .in_ready(iv_in_ready),
    .go(iv_go), .out_valid(iv_out_valid), .out_data(iv_out_data), .out_last(iv_out_last),
    .out_ready(iv_out_ready), .running(iv_running), .result_count(iv_result_count),
    .rounds(iv_rounds)
  );
endmodule
