// Self-checking end-to-end test of the merge-sort executor at N = 16.
// Queries of 16 and of 8 distinct random values seq(1,v) (remaining cells
// empty) must end with the arcs between consecutive values of the sorted
// list and one seq(k, min) constraint, k being the number of values.
module tb_msort_executor;
  import chr_pkg::*;
  localparam int N = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  ms_c_t query [N], result [N];
  logic [31:0] rounds;

  msort_executor #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int run = 0; run < 4; run++) begin
      int k, vals [$], narc, nseq, found;
      k = (run % 2 == 0) ? N : N / 2;
      vals.delete();
      while (vals.size() < k) begin
        int v; v = $urandom_range(1, 60000);
        if (!(v inside {vals})) vals.push_back(v);
      end
      for (int i = 0; i < N; i++)
        query[i] = (i < k) ? '{1'b1, MS_SEQ, 16'd1, 16'(vals[i])} : '0;
      vals.sort();
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      wait (done);
      @(negedge clk);
      narc = 0; nseq = 0;
      for (int i = 0; i < N; i++) if (result[i].valid) begin
        if (result[i].kind == MS_ARC) narc++;
        else begin
          nseq++;
          check(result[i].x == 16'(k) && result[i].y == 16'(vals[0]), "chain head seq(k,min)");
        end
      end
      check(narc == k - 1 && nseq == 1, $sformatf("run %0d: %0d arcs %0d seqs", run, narc, nseq));
      for (int j = 0; j + 1 < k; j++) begin
        found = 0;
        for (int i = 0; i < N; i++)
          if (result[i].valid && result[i].kind == MS_ARC && result[i].x == 16'(vals[j])
              && result[i].y == 16'(vals[j+1])) found++;
        check(found == 1, $sformatf("arc %0d->%0d", vals[j], vals[j+1]));
      end
      $display("run %0d: %0d values sorted in %0d rounds", run, k, rounds);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
