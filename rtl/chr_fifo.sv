// Synchronous first-in first-out buffer of DEPTH entries of CW bits.
// One push and one pop per clock; `full`, `empty` and `count` are registered
// state. The head entry is visible on `rd_data` while `empty` is low. A push
// when full or a pop when empty is a protocol error (asserted). Used as the
// one-way link that carries arc constraints between the two merge-sort
// executors; its depth equals the store size.
module chr_fifo #(
  parameter int CW    = 34,
  parameter int DEPTH = 128,
  localparam int AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  logic [CW-1:0] wr_data,
  input  logic          pop,
  output logic [CW-1:0] rd_data,
  output logic          full,
  output logic          empty,
  output logic [AW:0]   count
);
  logic [CW-1:0] mem [DEPTH];
  logic [AW-1:0] wp, rp;

  assign full    = (count == (AW+1)'(DEPTH));
  assign empty   = (count == '0);
  assign rd_data = mem[rp];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (push) begin
        mem[wp] <= wr_data;
        wp      <= (int'(wp) == DEPTH - 1) ? '0 : wp + 1'b1;
      end
      if (pop) rp <= (int'(rp) == DEPTH - 1) ? '0 : rp + 1'b1;
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> !full)
    else $error("chr_fifo: push when full");
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty)
    else $error("chr_fifo: pop when empty");
endmodule
