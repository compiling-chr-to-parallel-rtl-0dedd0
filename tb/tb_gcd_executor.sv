// Self-checking end-to-end test of the gcd executor (round-robin switch and
// PHBs) at N = 16. Several random queries, with empty slots, repeated values
// and zeros, are run; at `done` exactly one valid cell must hold the gcd of
// the non-zero inputs, computed here with Euclid's algorithm. The number of
// rounds must be at least N-1 (the final quiet sweep) and the run must end.
module tb_gcd_executor;
  import chr_pkg::*;
  localparam int N = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  gcd_c_t query [N], result [N];
  logic [31:0] rounds;

  gcd_executor #(.N(N)) dut (.*);
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
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 12; t++) begin
      int g, nv, val, base;
      g    = 0;
      base = $urandom_range(1, 40);
      for (int i = 0; i < N; i++) begin
        // multiples of a common base so that the gcd is often above 1
        val = (t % 3 == 0) ? $urandom_range(0, 5000) : base * $urandom_range(1, 300);
        if (i == 5 && t % 2 == 0) val = 0;
        query[i] = '{valid: (i % 7 != 6 || t == 0), n: 16'(val)};
        if (query[i].valid && val != 0) g = (g == 0) ? val : gcd_ref(g, val);
      end
      if (t == 1) for (int i = 0; i < N; i++) query[i].n = 16'd42;  // all equal
      if (t == 1) g = 42;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      wait (done);
      @(negedge clk);
      nv = 0;
      val = 0;
      for (int i = 0; i < N; i++) if (result[i].valid) begin nv++; val = result[i].n; end
      check(nv == (g != 0 ? 1 : 0), $sformatf("run %0d: %0d valid cells", t, nv));
      check(val == g, $sformatf("run %0d: gcd %0d expected %0d", t, val, g));
      check(rounds >= N - 1, "at least one quiet sweep");
      $display("run %0d: gcd %0d after %0d rounds", t, val, rounds);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
