// Self-checking end-to-end test of the massive-parallel prime sieve at
// N = 32 and ROWS = 4 (8 steps per sweep). With the query prime(2..33) in a
// shuffled order, every composite has a valid divisor among the read
// constraints of the first sweep, so the run takes exactly two sweeps:
// 2 * N/ROWS = 16 steps. At `done` exactly the primes remain valid.
module tb_prime_mp_executor;
  import chr_pkg::*;
  localparam int N = 32, ROWS = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  prime_c_t query [N], result [N];
  logic [31:0] steps;

  prime_mp_executor #(.N(N), .ROWS(ROWS)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic is_prime(input int v);
    if (v < 2) return 0;
    for (int d = 2; d * d <= v; d++) if (v % d == 0) return 0;
    return 1;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) query[i] = '{valid: 1'b1, n: 16'(i + 2)};
    for (int i = N - 1; i > 0; i--) begin
      int j; prime_c_t tmp;
      j = $urandom_range(0, i);
      tmp = query[i]; query[i] = query[j]; query[j] = tmp;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int run = 0; run < 2; run++) begin
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      wait (done);
      @(negedge clk);
      for (int i = 0; i < N; i++)
        check(result[i].valid == is_prime(int'(result[i].n)), $sformatf("value %0d", result[i].n));
      check(steps == 2 * N / ROWS, $sformatf("steps %0d", steps));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
