// Shift-register switch for strong parallelism.
// The constraint store is a circular shift register of N cells (valid = MSB).
// Cell 0 holds the read constraint: it is fed to the first input of all N-1
// PHBs, and cell i+1 to the second (removed) input of PHB i. Since the read
// constraint is only read, all PHBs can use it at once. When every PHB has
// finished (barrier) the removed-constraint results replace cells 1..N-1 and
// the register shifts by one place (cell i takes cell i-1, cell 0 takes cell
// N-1); it keeps shifting, one place per clock, until a valid constraint sits
// in cell 0, and then starts the next round. The run ends after N shifts in a
// row with no change: every valid constraint has then been the read one
// against an unchanged store.
// Interface: pulse `start` with `query`; `done` stays high until next start.
// `rounds` and `shifts` count rounds and single-place shifts.
// The structure (one cell to all PHBs, shift until valid) follows the strong
// parallelism scheme; the termination rule is this design's choice.
module chr_sp_switch
  import chr_pkg::*;
#(
  parameter int CW = 17,
  parameter int N  = 128,
  localparam int P = N - 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [CW-1:0] query   [N],
  output logic          busy,
  output logic          done,
  output logic [CW-1:0] cells   [N],
  output logic [31:0]   rounds,
  output logic [31:0]   shifts,
  // PHB side
  output logic          phb_load,
  output logic [CW-1:0] phb_read,
  output logic [CW-1:0] phb_rem [P],
  input  logic [CW-1:0] res_rem [P],
  input  logic [P-1:0]  phb_finish,
  input  logic [P-1:0]  phb_changed
);
  if (N < 2) begin : g_bad_n
    $error("chr_sp_switch: N must be at least 2");
  end

  sp_state_e     state;
  logic [31:0]   quiet;   // shifts since the last change
  logic [CW-1:0] wb  [N];
  logic [CW-1:0] sh  [N];

  assign phb_read = cells[0];
  always_comb for (int i = 0; i < P; i++) phb_rem[i] = cells[i+1];

  // write-back of the removed-constraint outputs, followed by one shift
  always_comb begin
    wb[0] = cells[0];
    for (int i = 0; i < P; i++) wb[i+1] = res_rem[i];
    sh[0] = wb[N-1];
    for (int i = 1; i < N; i++) sh[i] = wb[i-1];
  end

  assign phb_load = (state == SP_LOAD);
  assign busy     = (state != SP_IDLE) && (state != SP_DONE);
  assign done     = (state == SP_DONE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= SP_IDLE;
      quiet  <= '0;
      rounds <= '0;
      shifts <= '0;
      for (int i = 0; i < N; i++) cells[i] <= '0;
    end else begin
      unique case (state)
        SP_IDLE, SP_DONE: begin
          if (start) begin
            for (int i = 0; i < N; i++) cells[i] <= query[i];
            quiet  <= '0;
            rounds <= '0;
            shifts <= '0;
            state  <= SP_SEEK;
          end
        end
        SP_SEEK: begin
          if (quiet >= 32'(N)) begin
            state <= SP_DONE;
          end else if (cells[0][CW-1]) begin
            state <= SP_LOAD;
          end else begin
            cells[0] <= cells[N-1];
            for (int i = 1; i < N; i++) cells[i] <= cells[i-1];
            quiet  <= quiet + 1;
            shifts <= shifts + 1;
          end
        end
        SP_LOAD: state <= SP_WAIT;
        SP_WAIT: begin
          if (&phb_finish) begin
            for (int i = 0; i < N; i++) cells[i] <= sh[i];
            quiet  <= (|phb_changed) ? 32'd1 : quiet + 1;
            rounds <= rounds + 1;
            shifts <= shifts + 1;
            state  <= SP_SEEK;
          end
        end
        default: state <= SP_IDLE;
      endcase
    end
  end
endmodule
