// Massive-parallel prime sieve (set-based semantics).
// Runs  Prime @ prime(X) \ prime(Y) <=> Y mod X = 0 | true  by feeding ordered
// pairs of constraints to many rule instances at once; the same constraint
// goes to several instances. A constraint stays valid only if no instance
// removed it: its next valid bit is the AND of its current valid bit and the
// negated remove flags of all instances that saw it as Y.
// Ideally all N(N-1) ordered pairs are checked in one step; to bound the area
// ROWS read constraints are handled per step, each against all N cells, i.e.
// ROWS*N rule instances (pairs with X = Y cell are skipped). One step takes
// one clock, a sweep over all read constraints ceil(N/ROWS) clocks. Sweeps
// repeat until one removes nothing; then `done` rises.
// Rule instances are the combinational Prime block: a single-rule PHB needs
// no commit stage. Partial serialisation by ROWS is this design's choice of
// how to respect the area limit; the AND-of-valid collection follows the
// massive parallelism scheme. The sieve is sound for distinct values only
// (two equal values would remove each other in the same step).
// Interface: pulse `start` with `query`; `done` stays high until next start;
// `steps` counts clock steps.
module prime_mp_executor
  import chr_pkg::*;
#(
  parameter int N    = 128,
  parameter int ROWS = 8
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  prime_c_t query  [N],
  output logic     busy,
  output logic     done,
  output prime_c_t result [N],
  output logic [31:0] steps
);
  localparam int NSTEP = (N + ROWS - 1) / ROWS;
  localparam int SW    = (NSTEP > 1) ? $clog2(NSTEP) : 1;

  mp_state_e   state;
  prime_c_t    cells [N];
  logic [SW-1:0] step;
  logic        sweep_changed;
  logic [N-1:0] keep;
  logic [N-1:0] kill [ROWS];
  prime_c_t    rd [ROWS];

  // read constraints of this step
  always_comb begin
    for (int r = 0; r < ROWS; r++) begin
      rd[r] = '0;
      for (int i = 0; i < N; i++)
        if (i == int'(step) * ROWS + r) rd[r] = cells[i];
    end
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      prime_c_t y_unused;
      logic     f;
      rhb_prime u_rule (.x_in(rd[r]), .y_in(cells[j]), .y_out(y_unused), .fire(f));
      // skip the pair of a cell with itself
      assign kill[r][j] = f && (int'(step) * ROWS + r != j);
    end
  end

  // AND of the validity over all rule instances
  always_comb begin
    for (int j = 0; j < N; j++) begin
      keep[j] = cells[j].valid;
      for (int r = 0; r < ROWS; r++) keep[j] = keep[j] & ~kill[r][j];
    end
  end

  assign busy = (state == MP_RUN);
  assign done = (state == MP_DONE);
  always_comb for (int i = 0; i < N; i++) result[i] = cells[i];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= MP_IDLE;
      step  <= '0;
      steps <= '0;
      sweep_changed <= 1'b0;
      for (int i = 0; i < N; i++) cells[i] <= '0;
    end else begin
      unique case (state)
        MP_IDLE, MP_DONE: begin
          if (start) begin
            for (int i = 0; i < N; i++) cells[i] <= query[i];
            step  <= '0;
            steps <= '0;
            sweep_changed <= 1'b0;
            state <= MP_RUN;
          end
        end
        MP_RUN: begin
          for (int j = 0; j < N; j++) cells[j].valid <= keep[j];
          steps <= steps + 1;
          if (int'(step) == NSTEP - 1) begin
            step <= '0;
            sweep_changed <= 1'b0;
            if (!(sweep_changed || (keep != valid_vec(cells)))) state <= MP_DONE;
          end else begin
            step <= step + 1'b1;
            sweep_changed <= sweep_changed || (keep != valid_vec(cells));
          end
        end
        default: state <= MP_IDLE;
      endcase
    end
  end

  function automatic logic [N-1:0] valid_vec(input prime_c_t c [N]);
    for (int i = 0; i < N; i++) valid_vec[i] = c[i].valid;
  endfunction
endmodule
