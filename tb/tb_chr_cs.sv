// Self-checking test of the round-robin Combinatorial Switch on its own.
// The PHBs are modelled here: each returns its two inputs unchanged after a
// random delay of 1..5 clocks (so the barrier is exercised) and reports
// `changed` during the first CHG rounds. Checks: loads only happen when all
// model PHBs are idle; the run ends after exactly CHG + N-1 rounds; in the
// last N-1 rounds every pair of constraints met exactly once; the store ends
// as a permutation of the query. A second run writes a cell in the transfer
// window and checks that the write lands and restarts the quiet count.
module tb_chr_cs;
  localparam int N = 8, P = N / 2, CW = 9, CHG = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  logic [CW-1:0] query [N], cells [N], phb_a [P], phb_b [P], res_a [P], res_b [P];
  logic busy, done, phb_load, xfer, xfer_busy = 0, wr_en = 0, ext_hold = 0;
  logic [31:0] rounds;
  logic [P-1:0] fin, chg;
  logic [$clog2(N)-1:0] wr_idx = '0;
  logic [CW-1:0] wr_data = '0;
  int met [N][N];
  int round_no;

  chr_cs #(.CW(CW), .N(N)) dut (
    .clk, .rst_n, .start, .query, .busy, .done, .cells, .rounds, .phb_load,
    .phb_a, .phb_b, .res_a, .res_b, .phb_finish(fin), .phb_changed(chg),
    .xfer, .xfer_busy, .wr_en, .wr_idx, .wr_data, .ext_hold
  );
  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // model PHBs
  for (genvar i = 0; i < P; i++) begin : g_model
    int cnt;
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        fin[i] <= 1'b0; chg[i] <= 1'b0; cnt <= 0; res_a[i] <= '0; res_b[i] <= '0;
      end else if (phb_load) begin
        res_a[i] <= phb_a[i];
        res_b[i] <= phb_b[i];
        fin[i]   <= 1'b0;
        chg[i]   <= (round_no < CHG);
        cnt      <= $urandom_range(1, 5);
        if (round_no >= CHG) met[phb_a[i][7:0]][phb_b[i][7:0]]++;
      end else if (cnt > 0) begin
        cnt <= cnt - 1;
        if (cnt == 1) fin[i] <= 1'b1;
      end
    end
  end

  always @(posedge clk) if (rst_n && phb_load) begin
    check(&fin || round_no == 0, "load only after all PHBs finished");
    round_no <= round_no + 1;
  end
  // barrier: the switch may only leave WAIT when every PHB is finished
  always @(posedge clk) if (rst_n && xfer && $past(!xfer)) check(&$past(fin), "barrier");

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int seen [N];
    round_no = 0;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) met[i][j] = 0;
    for (int i = 0; i < N; i++) query[i] = {1'b1, 8'(i)};
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    wait (done);
    check(rounds == CHG + N - 1, $sformatf("rounds %0d", rounds));
    for (int i = 0; i < N; i++)
      for (int j = i + 1; j < N; j++)
        check(met[i][j] + met[j][i] == 1, $sformatf("pair %0d,%0d met %0d times", i, j, met[i][j] + met[j][i]));
    for (int i = 0; i < N; i++) seen[i] = 0;
    for (int i = 0; i < N; i++) seen[cells[i][7:0]]++;
    for (int i = 0; i < N; i++) check(seen[i] == 1 && cells[i][8], "permutation");

    // second run: a write in the transfer window after round 2
    round_no = CHG;  // no changes this time
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    wait (xfer && rounds == 2);
    @(negedge clk);
    xfer_busy = 1; wr_en = 1; wr_idx = 3; wr_data = {1'b1, 8'h55};
    @(negedge clk);
    wr_en = 0;
    @(negedge clk);
    xfer_busy = 0;
    wait (done);
    check(rounds == 2 + N - 1, $sformatf("rounds after write %0d", rounds));
    begin
      int f;
      f = 0;
      for (int i = 0; i < N; i++) if (cells[i] == {1'b1, 8'h55}) f++;
      check(f == 1, "written cell present");
    end
    // ext_hold keeps the switch from finishing
    ext_hold = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    repeat (400) @(negedge clk);
    check(!done && busy, "ext_hold blocks done");
    ext_hold = 0;
    wait (done);
    check(1'b1, "done after release");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
