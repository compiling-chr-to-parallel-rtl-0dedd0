// Combinatorial Switch (CS) with round-robin pairing.
// The switch owns the constraint store (N cells of CW bits, valid = MSB) and
// feeds it to N/2 two-input PHBs so that, over N-1 rounds, every constraint
// meets every other one exactly once. Pairing uses the circle method of a
// round-robin tournament: cell 0 stays put, cells 1..N-1 rotate by one place
// after each round, and PHB i receives cells i and N-1-i. Each PHB owns its
// pair alone, which is what lets the PHBs run in parallel. The switch is also
// the synchronisation barrier: it waits until every PHB reports `finish`,
// writes the results back into the cells, then rotates.
// The run ends when N-1 rounds in a row changed nothing (no PHB fired and no
// external write), i.e. every pair has been tried on the final store.
// Timing: a round is 1 load cycle, the slowest PHB's run, and at least one
// transfer cycle. In the transfer state (`xfer`) an enclosing block may write
// cells through wr_* and holds the switch there with `xfer_busy`; `ext_hold`
// keeps the switch from finishing while more constraints may arrive.
// The round-robin pairing and the barrier follow the CHR-to-hardware scheme;
// the termination rule and the transfer window are this design's choice.
module chr_cs
  import chr_pkg::*;
#(
  parameter int CW = 17,
  parameter int N  = 128,
  localparam int P  = N / 2,
  localparam int AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [CW-1:0] query    [N],
  output logic          busy,
  output logic          done,
  output logic [CW-1:0] cells    [N],
  output logic [31:0]   rounds,
  // PHB side
  output logic          phb_load,
  output logic [CW-1:0] phb_a    [P],
  output logic [CW-1:0] phb_b    [P],
  input  logic [CW-1:0] res_a    [P],
  input  logic [CW-1:0] res_b    [P],
  input  logic [P-1:0]  phb_finish,
  input  logic [P-1:0]  phb_changed,
  // transfer window between rounds
  output logic          xfer,
  input  logic          xfer_busy,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_idx,
  input  logic [CW-1:0] wr_data,
  input  logic          ext_hold
);
  if (N % 2 != 0 || N < 2) begin : g_bad_n
    $error("chr_cs: N must be even and at least 2");
  end

  cs_state_e     state;
  logic [31:0]   quiet;
  logic [CW-1:0] wb [N];
  logic [CW-1:0] rot[N];

  // Pairing: PHB i gets cells i and N-1-i
  always_comb begin
    for (int i = 0; i < P; i++) begin
      phb_a[i] = cells[i];
      phb_b[i] = cells[N-1-i];
    end
  end

  // Write-back of the PHB results, then rotation of cells 1..N-1
  always_comb begin
    for (int i = 0; i < P; i++) begin
      wb[i]     = res_a[i];
      wb[N-1-i] = res_b[i];
    end
    rot[0] = wb[0];
    if (N > 1) rot[1] = wb[N-1];
    for (int j = 2; j < N; j++) rot[j] = wb[j-1];
  end

  assign phb_load = (state == CS_LOAD);
  assign xfer     = (state == CS_XFER);
  assign busy     = (state != CS_IDLE) && (state != CS_DONE);
  assign done     = (state == CS_DONE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= CS_IDLE;
      quiet  <= '0;
      rounds <= '0;
      for (int i = 0; i < N; i++) cells[i] <= '0;
    end else begin
      unique case (state)
        CS_IDLE, CS_DONE: begin
          if (start) begin
            for (int i = 0; i < N; i++) cells[i] <= query[i];
            quiet  <= '0;
            rounds <= '0;
            state  <= CS_LOAD;
          end
        end
        CS_LOAD: state <= CS_WAIT;
        CS_WAIT: begin
          if (&phb_finish) begin
            for (int i = 0; i < N; i++) cells[i] <= rot[i];
            quiet  <= (|phb_changed) ? '0 : quiet + 1;
            rounds <= rounds + 1;
            state  <= CS_XFER;
          end
        end
        CS_XFER: begin
          if (wr_en) begin
            cells[wr_idx] <= wr_data;
            quiet         <= '0;
          end
          if (!xfer_busy) begin
            if (!wr_en && !ext_hold && quiet >= 32'(N - 1)) state <= CS_DONE;
            else                                            state <= CS_LOAD;
          end
        end
        default: state <= CS_IDLE;
      endcase
    end
  end

  // External writes are only accepted in the transfer window
  a_wr_in_xfer: assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> state == CS_XFER)
    else $error("chr_cs: write outside the transfer window");
endmodule
