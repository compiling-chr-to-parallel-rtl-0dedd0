// Accelerator side of the software wrapper call.
// The host sends the query one constraint per clock on in_valid/in_data
// (in_ready is high while collecting and the buffer has room), then pulses
// `go`. The buffer of N cells, with unused cells invalid, is handed to the
// executor as its query (`ex_start`). When the executor reports `ex_done`
// the interface returns only the valid result constraints, one per
// out_valid/out_ready handshake, so the host receives a packed list;
// `out_last` marks the final one and `result_count` counts them. With no
// valid result the interface returns straight to collecting.
// Word-serial transfer with valid/ready handshakes stands in for the PCI-E
// link and its packet format, which are not part of this design.
module chr_host_if
  import chr_pkg::*;
#(
  parameter int CW = 25,
  parameter int N  = 128,
  localparam int AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // host side
  input  logic          in_valid,
  input  logic [CW-1:0] in_data,
  output logic          in_ready,
  input  logic          go,
  output logic          out_valid,
  output logic [CW-1:0] out_data,
  output logic          out_last,
  input  logic          out_ready,
  output logic          running,
  output logic [AW:0]   result_count,
  // executor side
  output logic          ex_start,
  output logic [CW-1:0] ex_query [N],
  input  logic          ex_done,
  input  logic [CW-1:0] ex_cells [N]
);
  host_state_e  state;
  logic [AW:0]  wcount;
  logic [AW-1:0] rptr;
  logic [N-1:0] vmask, after;
  logic         more;

  assign in_ready = (state == H_LOAD) && (wcount < (AW+1)'(N));
  assign running  = (state == H_RUN);

  // valid cells at or after the read pointer, and whether one follows it
  always_comb begin
    for (int i = 0; i < N; i++) begin
      vmask[i] = ex_cells[i][CW-1];
      after[i] = vmask[i] && (i > int'(rptr));
    end
    more = |after;
  end

  assign out_valid = (state == H_UNLOAD) && vmask[rptr];
  assign out_data  = ex_cells[rptr];
  assign out_last  = out_valid && !more;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state        <= H_LOAD;
      wcount       <= '0;
      rptr         <= '0;
      ex_start     <= 1'b0;
      result_count <= '0;
      for (int i = 0; i < N; i++) ex_query[i] <= '0;
    end else begin
      ex_start <= 1'b0;
      unique case (state)
        H_LOAD: begin
          if (in_valid && in_ready) begin
            ex_query[wcount[AW-1:0]] <= in_data;
            wcount <= wcount + 1'b1;
          end
          if (go) begin
            ex_start     <= 1'b1;
            result_count <= '0;
            state        <= H_RUN;
          end
        end
        H_RUN: begin
          if (ex_done && !ex_start) begin
            rptr  <= '0;
            state <= H_UNLOAD;
          end
        end
        H_UNLOAD: begin
          // skip invalid cells; leave after the last valid one is taken
          if (!vmask[rptr] || out_ready) begin
            if (vmask[rptr]) result_count <= result_count + 1'b1;
            if (!more) begin
              state  <= H_LOAD;
              wcount <= '0;
              for (int i = 0; i < N; i++) ex_query[i] <= '0;
            end else begin
              rptr <= rptr + 1'b1;
            end
          end
        end
        default: state <= H_LOAD;
      endcase
    end
  end

  a_no_load_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    (state != H_LOAD) |-> !in_ready)
    else $error("chr_host_if: accepting data outside the load phase");
endmodule
