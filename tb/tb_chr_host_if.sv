// Self-checking test of the accelerator host interface with a model executor
// written here: after a random delay it reports done with the query in
// which every constraint with an even payload has been removed. Checks: the
// interface accepts at most N words, hands the words over in order with the
// rest of the buffer empty, returns exactly the surviving words in order
// with random back-pressure on out_ready, flags the last one, counts them,
// and handles a call whose result is empty.
module tb_chr_host_if;
  localparam int CW = 10, N = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, go = 0, out_valid, out_last, out_ready = 0, running;
  logic [CW-1:0] in_data = '0, out_data, ex_query [N], ex_cells [N];
  logic [$clog2(N):0] result_count;
  logic ex_start, ex_done;
  int delay;

  chr_host_if #(.CW(CW), .N(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // model executor
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ex_done <= 1'b0; delay <= 0;
      for (int i = 0; i < N; i++) ex_cells[i] <= '0;
    end else if (ex_start) begin
      ex_done <= 1'b0;
      delay   <= $urandom_range(1, 6);
      for (int i = 0; i < N; i++) ex_cells[i] <= ex_query[i];
    end else if (delay > 0) begin
      delay <= delay - 1;
      if (delay == 1) begin
        ex_done <= 1'b1;
        for (int i = 0; i < N; i++) if (ex_cells[i][0] == 1'b0) ex_cells[i][CW-1] <= 1'b0;
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int call = 0; call < 6; call++) begin
      int nw, accepted, exp [$], got [$];
      logic saw_last;
      nw = (call == 0) ? N + 2 : $urandom_range(1, N);
      accepted = 0;
      exp.delete(); got.delete();
      for (int w = 0; w < nw; w++) begin
        logic [CW-2:0] p;
        p = (call == 5) ? (CW-1)'(2 * w) : (CW-1)'($urandom);   // call 5: all even
        @(negedge clk);
        in_valid = 1; in_data = {1'b1, p};
        #1;
        if (in_ready) begin
          accepted++;
          if (p[0]) exp.push_back(int'(p));
        end
        @(posedge clk);
      end
      @(negedge clk) in_valid = 0;
      check(accepted == ((nw > N) ? N : nw), $sformatf("accepted %0d", accepted));
      go = 1;
      @(negedge clk) go = 0;
      // the buffer is handed over with unused cells empty
      @(negedge clk);
      for (int i = accepted; i < N; i++) check(!ex_query[i][CW-1], "unused cell empty");
      saw_last = 0;
      while (running || !saw_last) begin
        @(negedge clk);
        out_ready = ($urandom_range(0, 2) != 0);
        #1;
        if (out_valid && out_ready) begin
          got.push_back(int'(out_data[CW-2:0]));
          if (out_last) saw_last = 1;
        end
        if (!running && !out_valid && got.size() == exp.size()) break;
      end
      @(negedge clk);
      check(got == exp, $sformatf("call %0d: %0d results, %0d expected", call, got.size(), exp.size()));
      check(saw_last == (exp.size() > 0), "out_last");
      check(int'(result_count) == exp.size(), "result_count");
      repeat (2) @(negedge clk);
      check(in_ready, "ready for the next call");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
