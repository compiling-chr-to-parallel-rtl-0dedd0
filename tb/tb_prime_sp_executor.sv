// Self-checking end-to-end test of the strong-parallel prime sieve at N = 32
// with the query prime(2), ..., prime(33): at `done` exactly the primes must
// remain valid (checked against trial division here).
module tb_prime_sp_executor;
  import chr_pkg::*;
  localparam int N = 32;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  prime_c_t query [N], result [N];
  logic [31:0] rounds, shifts;

  prime_sp_executor #(.N(N)) dut (.*);
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
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // shuffled query so that small divisors are not always first
    for (int i = 0; i < N; i++) query[i] = '{valid: 1'b1, n: 16'(i + 2)};
    for (int i = N - 1; i > 0; i--) begin
      int j; prime_c_t tmp;
      j = $urandom_range(0, i);
      tmp = query[i]; query[i] = query[j]; query[j] = tmp;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    wait (done);
    @(negedge clk);
    for (int i = 0; i < N; i++)
      check(result[i].valid == is_prime(int'(result[i].n)), $sformatf("value %0d", result[i].n));
    $display("prime sieve N=%0d: %0d rounds, %0d shifts", N, rounds, shifts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
