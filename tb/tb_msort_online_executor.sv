// Self-checking end-to-end test of the online merge sort (two executors and
// a FIFO) at N = 16. Queries of 16 and 8 distinct values: at `done` the
// second executor's store must hold exactly the arcs between consecutive
// sorted values, the first executor's store exactly one seq(k, min) and no
// arc, and k-1 arcs must have gone through the FIFO.
module tb_msort_online_executor;
  import chr_pkg::*;
  localparam int N = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  ms_c_t query [N], seqs [N], arcs [N];
  logic [31:0] rounds1, rounds2, arcs_moved, fifo_full_waits;
  logic [$clog2(N):0] fifo_peak;

  msort_online_executor #(.N(N)) dut (.*);
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
      for (int i = 0; i < N; i++) begin
        if (seqs[i].valid) begin
          check(seqs[i].kind == MS_SEQ, "no arc left in executor 1");
          if (seqs[i].kind == MS_SEQ) begin
            nseq++;
            check(seqs[i].x == 16'(k) && seqs[i].y == 16'(vals[0]), "chain head seq(k,min)");
          end
        end
        if (arcs[i].valid) begin
          check(arcs[i].kind == MS_ARC, "only arcs in executor 2");
          narc++;
        end
      end
      check(narc == k - 1 && nseq == 1, $sformatf("run %0d: %0d arcs %0d seqs", run, narc, nseq));
      check(arcs_moved == 32'(k - 1), $sformatf("arcs through the FIFO %0d", arcs_moved));
      for (int j = 0; j + 1 < k; j++) begin
        found = 0;
        for (int i = 0; i < N; i++)
          if (arcs[i].valid && arcs[i].x == 16'(vals[j]) && arcs[i].y == 16'(vals[j+1])) found++;
        check(found == 1, $sformatf("arc %0d->%0d", vals[j], vals[j+1]));
      end
      $display("run %0d: %0d values, rounds %0d/%0d, FIFO peak %0d, full waits %0d",
               run, k, rounds1, rounds2, fifo_peak, fifo_full_waits);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
