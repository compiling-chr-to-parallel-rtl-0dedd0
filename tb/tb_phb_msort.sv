// Self-checking test of the merge-sort PHB. Random pairs of arcs or seqs
// (sources / lengths often equal, targets distinct from sources) are loaded.
// When both are valid, of the same kind, share the first argument and have
// different second arguments exactly one rule fires: two arcs become the
// shorter arc plus the arc between the targets, two seqs become seq(2N,min)
// plus arc(min,max). Then finish is high three clock edges after load is
// raised, otherwise two. Results are compared as unordered pairs.
module tb_phb_msort;
  import chr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0, finish, changed;
  ms_c_t in_a, in_b, out_a, out_b;

  phb_msort dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 500; t++) begin
      ms_c_t ea, eb;
      logic fire;
      int cyc, lo, hi;
      in_a = '{valid: (t % 13 != 0), kind: ms_kind_e'($urandom_range(0, 1)),
               x: 16'($urandom_range(1, 2)), y: 16'($urandom_range(10, 14))};
      in_b = '{valid: 1'b1, kind: ms_kind_e'($urandom_range(0, 1)),
               x: 16'($urandom_range(1, 2)), y: 16'($urandom_range(10, 14))};
      fire = in_a.valid && in_a.kind == in_b.kind && in_a.x == in_b.x && in_a.y != in_b.y;
      lo = (in_a.y < in_b.y) ? in_a.y : in_b.y;
      hi = (in_a.y < in_b.y) ? in_b.y : in_a.y;
      if (fire && in_a.kind == MS_ARC)
        begin ea = '{1'b1, MS_ARC, in_a.x, 16'(lo)}; eb = '{1'b1, MS_ARC, 16'(lo), 16'(hi)}; end
      else if (fire)
        begin ea = '{1'b1, MS_SEQ, 16'(2 * in_a.x), 16'(lo)}; eb = '{1'b1, MS_ARC, 16'(lo), 16'(hi)}; end
      else
        begin ea = in_a; eb = in_b; end
      @(negedge clk) load = 1;
      @(negedge clk) load = 0;
      cyc = 1;
      while (!finish) begin @(negedge clk); cyc++; end
      check(cyc == (fire ? 3 : 2), $sformatf("latency %0d", cyc));
      check((out_a == ea && out_b == eb) || (out_a == eb && out_b == ea), $sformatf("result t=%0d", t));
      check(changed == fire, "changed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
