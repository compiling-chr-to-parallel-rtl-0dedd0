// Self-checking end-to-end test of the interval-solver accelerator at N = 16.
// The test plays the host: it sends 5 random intervals on each of 3
// variables, calls the accelerator and reads back the packed result, which
// must hold exactly one interval per variable equal to the intersection of
// that variable's intervals.
module tb_interval_accel;
  import chr_pkg::*;
  localparam int N = 16, NV = 3, PER = 5;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, go = 0, out_valid, out_last, out_ready = 1, running;
  iv_c_t in_data = '0, out_data;
  logic [$clog2(N):0] result_count;
  logic [31:0] rounds;

  interval_accel #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

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
      int lo [NV], hi [NV];
      iv_c_t r [$];
      for (int v = 0; v < NV; v++) begin lo[v] = 0; hi[v] = 65535; end
      r.delete();
      for (int i = 0; i < NV * PER; i++) begin
        int v, a, b;
        v = i % NV;
        a = $urandom_range(0, 100);
        b = a + $urandom_range(50, 200);
        if (a > lo[v]) lo[v] = a;
        if (b < hi[v]) hi[v] = b;
        @(negedge clk) in_valid = 1; in_data = '{1'b1, 8'(v), 16'(a), 16'(b)};
        @(posedge clk);
      end
      @(negedge clk) in_valid = 0; go = 1;
      @(negedge clk) go = 0;
      while (!out_last) begin
        @(posedge clk);
        if (out_valid && out_ready) r.push_back(out_data);
      end
      @(negedge clk);
      check(r.size() == NV, $sformatf("call %0d: %0d results", call, r.size()));
      for (int v = 0; v < NV; v++) begin
        int f;
        f = 0;
        foreach (r[i]) if (r[i].v == 8'(v) && r[i].lo == 16'(lo[v]) && r[i].hi == 16'(hi[v])) f++;
        check(f == 1, $sformatf("variable %0d: [%0d,%0d]", v, lo[v], hi[v]));
      end
      $display("call %0d: %0d rounds", call, rounds);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
