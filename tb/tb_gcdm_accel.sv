// Self-checking end-to-end test of the gcd-matrix accelerator at N = 16.
// The test plays the host: for a set of k one-byte numbers it produces the
// constraints of the propagation rules (gcd(X,Y,nX) and gcd(X,Y,nY) for
// X < Y, gcd(X,X,nX)), sends them, calls the accelerator and reads back the
// packed result, which must hold exactly one gcd(X,Y,gcd(nX,nY)) per
// position of the upper triangular matrix.
module tb_gcdm_accel;
  import chr_pkg::*;
  localparam int N = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, go = 0, out_valid, out_last, out_ready = 1, running;
  gm_c_t in_data = '0, out_data;
  logic [$clog2(N):0] result_count;
  logic [31:0] rounds;

  gcdm_accel #(.N(N)) dut (.*);
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
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int call = 0; call < 4; call++) begin
      int k, nums [], nres;
      gm_c_t q [$], r [$];
      k = (call % 2 == 0) ? 4 : 3;
      nums = new[k];
      for (int i = 0; i < k; i++) nums[i] = 6 * $urandom_range(1, 42);
      q.delete(); r.delete();
      for (int x = 0; x < k; x++)
        for (int y = x; y < k; y++) begin
          q.push_back('{1'b1, 8'(x + 1), 8'(y + 1), 8'(nums[x])});
          if (y != x) q.push_back('{1'b1, 8'(x + 1), 8'(y + 1), 8'(nums[y])});
        end
      foreach (q[i]) begin
        @(negedge clk) in_valid = 1; in_data = q[i];
        @(posedge clk);
      end
      @(negedge clk) in_valid = 0; go = 1;
      @(negedge clk) go = 0;
      while (!out_last) begin
        @(posedge clk);
        if (out_valid && out_ready) r.push_back(out_data);
      end
      @(negedge clk);
      nres = k * (k + 1) / 2;
      check(r.size() == nres, $sformatf("call %0d: %0d results, %0d expected", call, r.size(), nres));
      for (int x = 0; x < k; x++)
        for (int y = x; y < k; y++) begin
          int f;
          f = 0;
          foreach (r[i])
            if (r[i].x == 8'(x + 1) && r[i].y == 8'(y + 1) && r[i].n == 8'(gcd_ref(nums[x], nums[y]))) f++;
          check(f == 1, $sformatf("gcd at (%0d,%0d)", x + 1, y + 1));
        end
      $display("call %0d: %0d constraints in, %0d out, %0d rounds", call, q.size(), r.size(), rounds);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
