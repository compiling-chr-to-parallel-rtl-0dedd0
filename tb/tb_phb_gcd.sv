// Self-checking test of the gcd PHB. Random pairs (with zeros, equal values
// and invalid inputs) are loaded; the test waits for `finish` and checks the
// surviving valid constraints against Euclid's gcd, the `changed` flag, and
// the cycle count: one rewrite per clock, so finish must rise exactly
// (number of rule firings + 2) clock edges after load is raised (the load
// edge, one edge per firing, one edge that finds nothing to do), where the firings are
// counted by a reference run of subtractive Euclid in this test.
module tb_phb_gcd;
  import chr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0;
  gcd_c_t in_a, in_b, out_a, out_b;
  logic finish, changed;

  phb_gcd dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int gcd_ref(input int a, input int b);
    while (b != 0) begin int t = a % b; a = b; b = t; end
    return a;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 300; t++) begin
      int a, b, fires, cyc, nvalid, vsum;
      logic va, vb;
      a  = (t % 9 == 0) ? 0 : $urandom_range(1, 500);
      b  = (t % 6 == 0) ? a : $urandom_range(0, 500);
      va = (t % 10 != 3);
      vb = (t % 10 != 7);
      // reference: count firings with the R0-before-R1 commit order
      begin
        int x, y; logic vx, vy;
        x = a; y = b; vx = va; vy = vb;
        fires = 0;
        forever begin
          if ((vx && x == 0) || (vy && y == 0)) begin
            if (vx && x == 0) vx = 0;
            if (vy && y == 0) vy = 0;
            fires++;
          end else if (vx && vy && y >= x) begin y -= x; fires++; end
          else if (vx && vy && x >= y) begin x -= y; fires++; end
          else break;
        end
      end
      @(negedge clk);
      in_a = '{valid: va, n: 16'(a)};
      in_b = '{valid: vb, n: 16'(b)};
      load = 1;
      @(negedge clk);
      load = 0;
      cyc = 1;
      while (!finish) begin @(negedge clk); cyc++; end
      check(cyc == fires + 2, $sformatf("latency %0d vs %0d (a=%0d b=%0d)", cyc, fires + 2, a, b));
      check(changed == (fires != 0), "changed flag");
      nvalid = int'(out_a.valid) + int'(out_b.valid);
      vsum   = (out_a.valid ? int'(out_a.n) : 0) + (out_b.valid ? int'(out_b.n) : 0);
      if (va && vb && a != 0 && b != 0) begin
        check(nvalid == 1 && vsum == gcd_ref(a, b), $sformatf("gcd(%0d,%0d)", a, b));
      end else begin
        int exp_n, exp_s;
        exp_n = int'(va && a != 0) + int'(vb && b != 0);
        exp_s = ((va && a != 0) ? a : 0) + ((vb && b != 0) ? b : 0);
        check(nvalid == exp_n && vsum == exp_s, $sformatf("single or empty input %0d %0d %0d %0d -> %0d %0d", a, b, va, vb, nvalid, vsum));
      end
      // outputs stay put while finish is high
      @(negedge clk);
      check(finish && (out_a.valid + out_b.valid) == nvalid, "finish holds");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
