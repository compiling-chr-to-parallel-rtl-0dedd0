// Prime PHB for the strong-parallel switch: registers a read constraint X and
// a removed constraint Y, applies the Prime rule (remove Y if X divides it)
// each clock, and signals `finish` one clock after a step that changed
// nothing. With a single rule there is nothing to commit between; the PHB
// finishes two clocks after `load`. Handshake as for the other PHBs
// (this design's choice).
module phb_prime
  import chr_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     load,
  input  prime_c_t in_read,
  input  prime_c_t in_rem,
  output prime_c_t out_read,
  output prime_c_t out_rem,
  output logic     finish,
  output logic     changed
);
  prime_c_t x_q, y_q, y_d;
  logic     fired;

  rhb_prime u_rule (.x_in(x_q), .y_in(y_q), .y_out(y_d), .fire(fired));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x_q <= '0; y_q <= '0; finish <= 1'b0; changed <= 1'b0;
    end else if (load) begin
      x_q <= in_read; y_q <= in_rem; finish <= 1'b0; changed <= 1'b0;
    end else begin
      y_q     <= y_d;
      finish  <= !fired;
      changed <= changed || fired;
    end
  end

  assign out_read = x_q;
  assign out_rem  = y_q;
endmodule
