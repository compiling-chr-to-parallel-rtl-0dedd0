// Self-checking end-to-end test of the strong-parallel gcd executor at N = 16.
// Random queries (some cells empty, values sharing a common factor) must end
// with exactly one valid cell holding the gcd computed here by Euclid's
// algorithm; the run must end with a quiet rotation (shifts >= N).
module tb_gcd_sp_executor;
  import chr_pkg::*;
  localparam int N = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  gcd_c_t query [N], result [N];
  logic [31:0] rounds, shifts;

  gcd_sp_executor #(.N(N)) dut (.*);
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
    for (int t = 0; t < 10; t++) begin
      int g, nv, val, base;
      g = 0;
      base = $urandom_range(1, 30);
      for (int i = 0; i < N; i++) begin
        val = (t % 3 == 0) ? $urandom_range(1, 5000) : base * $urandom_range(1, 500);
        query[i] = '{valid: (i % 5 != 2), n: 16'(val)};
        if (query[i].valid) g = (g == 0) ? val : gcd_ref(g, val);
      end
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      wait (done);
      @(negedge clk);
      nv = 0; val = 0;
      for (int i = 0; i < N; i++) if (result[i].valid) begin nv++; val = result[i].n; end
      check(nv == 1, $sformatf("run %0d: %0d valid cells", t, nv));
      check(val == g, $sformatf("run %0d: gcd %0d expected %0d", t, val, g));
      check(shifts >= N, "quiet rotation");
      $display("run %0d: gcd %0d, %0d rounds, %0d shifts", t, val, rounds, shifts);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
