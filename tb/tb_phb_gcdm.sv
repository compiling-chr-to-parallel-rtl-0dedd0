// Self-checking test of the gcd-matrix PHB: pairs gcd(X,Y,N), gcd(X',Y',M)
// with equal or different positions. Equal positions must leave one valid
// constraint gcd(X,Y,gcd(N,M)) (Euclid's algorithm computed here); different
// positions must change nothing except removing zero values. The latency
// (firings + 2 clock edges) is checked against a reference count.
module tb_phb_gcdm;
  import chr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0, finish, changed;
  gm_c_t in_a, in_b, out_a, out_b;

  phb_gcdm dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int gcd_ref(input int a, input int b);
    while (b != 0) begin int t; t = a % b; a = b; b = t; end
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
    for (int t = 0; t < 400; t++) begin
      int n, m, fires, cyc, x, y;
      logic same;
      n = $urandom_range(1, 255);
      m = (t % 5 == 0) ? n : $urandom_range(1, 255);
      same = (t % 4 != 1);
      in_a = '{1'b1, 8'd3, 8'd7, 8'(n)};
      in_b = same ? '{1'b1, 8'd3, 8'd7, 8'(m)} : '{1'b1, 8'd3, 8'd8, 8'(m)};
      // reference firing count (subtractive Euclid, then removal of the zero)
      fires = 0;
      if (same) begin
        x = n; y = m;
        while (x != 0 && y != 0) begin
          if (y >= x) y -= x; else x -= y;
          fires++;
        end
        fires++;
      end
      @(negedge clk) load = 1;
      @(negedge clk) load = 0;
      cyc = 1;
      while (!finish) begin @(negedge clk); cyc++; end
      check(cyc == fires + 2, $sformatf("latency %0d expected %0d", cyc, fires + 2));
      if (same) begin
        check(out_a.valid != out_b.valid, "one survivor");
        check((out_a.valid ? out_a : out_b) == '{1'b1, 8'd3, 8'd7, 8'(gcd_ref(n, m))}, "gcd value and position");
      end else begin
        check(out_a == in_a && out_b == in_b, "different positions untouched");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
