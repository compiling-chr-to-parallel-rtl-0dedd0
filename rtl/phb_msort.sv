// Program hardware block of the flattened merge sort.
// Two c/3 inputs, two outputs, four rule blocks: M0 and M1, each in both
// argument orders. After flattening all constraints share one type, so no
// two rules can fire together: the commit stage takes the first firing rule
// in the order M0(a,b), M0(b,a), M1(a,b), M1(b,a). The state is rewritten
// once per clock; `finish` rises one clock after a step that changed nothing,
// `changed` tells whether any rule fired since `load`. Rules and
// single-rule commit follow the merge-sort compilation; the priority order
// and the handshake are this design's choice.
module phb_msort
  import chr_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  load,
  input  ms_c_t in_a,
  input  ms_c_t in_b,
  output ms_c_t out_a,
  output ms_c_t out_b,
  output logic  finish,
  output logic  changed
);
  ms_c_t a_q, b_q, a_d, b_d;
  ms_c_t o0a [4], o0b [4];
  logic [3:0] f;
  logic  fired;

  rhb_msort #(.RULE(RULE_M0)) u_m0_ab (.a_in(a_q), .b_in(b_q), .a_out(o0a[0]), .b_out(o0b[0]), .fire(f[0]));
  rhb_msort #(.RULE(RULE_M0)) u_m0_ba (.a_in(b_q), .b_in(a_q), .a_out(o0a[1]), .b_out(o0b[1]), .fire(f[1]));
  rhb_msort #(.RULE(RULE_M1)) u_m1_ab (.a_in(a_q), .b_in(b_q), .a_out(o0a[2]), .b_out(o0b[2]), .fire(f[2]));
  rhb_msort #(.RULE(RULE_M1)) u_m1_ba (.a_in(b_q), .b_in(a_q), .a_out(o0a[3]), .b_out(o0b[3]), .fire(f[3]));

  // Commit: first firing rule wins; copies with swapped inputs swap back
  always_comb begin
    a_d   = a_q;
    b_d   = b_q;
    fired = |f;
    if      (f[0]) begin a_d = o0a[0]; b_d = o0b[0]; end
    else if (f[1]) begin a_d = o0b[1]; b_d = o0a[1]; end
    else if (f[2]) begin a_d = o0a[2]; b_d = o0b[2]; end
    else if (f[3]) begin a_d = o0b[3]; b_d = o0a[3]; end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_q <= '0; b_q <= '0; finish <= 1'b0; changed <= 1'b0;
    end else if (load) begin
      a_q <= in_a; b_q <= in_b; finish <= 1'b0; changed <= 1'b0;
    end else begin
      a_q     <= a_d;
      b_q     <= b_d;
      finish  <= !fired;
      changed <= changed || fired;
    end
  end

  assign out_a = a_q;
  assign out_b = b_q;
endmodule
