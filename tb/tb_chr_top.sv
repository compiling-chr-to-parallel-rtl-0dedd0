// End-to-end test of chr_top at its default sizes (128-constraint stores).
// All eight designs run concurrently, one complete operation each:
//   gcd (round-robin switch) and gcd (strong parallel) on 128 multiples of a
//   common factor, prime sieve (strong and massive parallelism) on
//   prime(2..129), merge sort and online merge sort on 128 distinct values,
//   the gcd-matrix accelerator on an 11-element set (121 constraints) and
//   the interval accelerator on 6 variables x 20 intervals.
// Every result is checked against a reference computed here. The test also
// counts how often each mechanism of the design happened and fails if one
// never did: R0 removal, R1 rewrite, the commit stage choosing one of two
// enabled R1 copies, the switch barrier waiting on a slow PHB, the quiet sweep that ends
// a run, the shift-until-valid step, a removal voted by several massive-
// parallel instances, arcs crossing the FIFO, the second merge executor
// merging arcs while the first is still producing them, and the accelerator skipping removed cells on unload.
module tb_chr_top;
  import chr_pkg::*;
  localparam int N = 128;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  logic gcd_start = 0, gsp_start = 0, psp_start = 0, pmp_start = 0, ms_start = 0, mso_start = 0;
  gcd_c_t   gcd_query [N], gcd_result [N], gsp_query [N], gsp_result [N];
  prime_c_t psp_query [N], psp_result [N], pmp_query [N], pmp_result [N];
  ms_c_t    ms_query [N], ms_result [N], mso_query [N], mso_seqs [N], mso_arcs [N];
  logic gcd_busy, gcd_done, gsp_busy, gsp_done, psp_busy, psp_done, pmp_busy, pmp_done;
  logic ms_busy, ms_done, mso_busy, mso_done;
  logic [31:0] gcd_rounds, gsp_rounds, gsp_shifts, psp_rounds, psp_shifts, pmp_steps, ms_rounds;
  logic [31:0] mso_rounds1, mso_rounds2, mso_arcs_moved, mso_fifo_full_waits;
  logic [$clog2(N):0] mso_fifo_peak, gm_result_count, iv_result_count;
  logic gm_in_valid = 0, gm_in_ready, gm_go = 0, gm_out_valid, gm_out_last, gm_out_ready = 1, gm_running;
  logic iv_in_valid = 0, iv_in_ready, iv_go = 0, iv_out_valid, iv_out_last, iv_out_ready = 1, iv_running;
  gm_c_t gm_in_data = '0, gm_out_data;
  iv_c_t iv_in_data = '0, iv_out_data;
  logic [31:0] gm_rounds, iv_rounds;

  chr_top dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int gcd_ref(input int a, input int b);
    while (b != 0) begin int t; t = a % b; a = b; b = t; end
    return a;
  endfunction
  function automatic logic is_prime(input int v);
    if (v < 2) return 0;
    for (int d = 2; d * d <= v; d++) if (v % d == 0) return 0;
    return 1;
  endfunction

  // ---------------- mechanism counters ----------------
  int n_r0, n_r1, n_commit, n_barrier, n_quiet_end, n_seek, n_vote, n_hold, n_skip;
  initial begin
    n_r0 = 0; n_r1 = 0; n_commit = 0; n_barrier = 0; n_quiet_end = 0;
    n_seek = 0; n_vote = 0; n_hold = 0; n_skip = 0;
  end
  always @(posedge clk) if (rst_n) begin
    if (dut.u_gcd.u_cs.state == CS_WAIT && |dut.u_gcd.u_cs.phb_finish && !(&dut.u_gcd.u_cs.phb_finish)) n_barrier++;
    if (dut.u_gsp.u_sw.state == SP_SEEK && !dut.u_gsp.u_sw.cells[0][GCD_W] && dut.u_gsp.u_sw.quiet < N) n_seek++;
    for (int j = 0; j < N; j++) begin
      int k; k = 0;
      for (int r = 0; r < 8; r++) k += int'(dut.u_pmp.kill[r][j]);
      if (dut.u_pmp.state == MP_RUN && k > 1) n_vote++;
    end
    if (dut.u_mso.u_cs2.state == CS_WAIT && &dut.u_mso.u_cs2.phb_finish && |dut.u_mso.u_cs2.phb_changed
        && !dut.u_mso.done1) n_hold++;
    if (dut.u_gm.u_if.state == H_UNLOAD && !dut.u_gm.u_if.vmask[dut.u_gm.u_if.rptr]) n_skip++;
  end
  // per-PHB rule activity of the round-robin gcd executor
  int r0_cnt [N/2], r1_cnt [N/2], cm_cnt [N/2];
  for (genvar i = 0; i < N / 2; i++) begin : g_probe
    initial begin r0_cnt[i] = 0; r1_cnt[i] = 0; cm_cnt[i] = 0; end
    always @(posedge clk) if (rst_n) begin
      if (dut.u_gcd.g_phb[i].u_phb.f0a || dut.u_gcd.g_phb[i].u_phb.f0b) r0_cnt[i]++;
      if (dut.u_gcd.g_phb[i].u_phb.f1ab || dut.u_gcd.g_phb[i].u_phb.f1ba) r1_cnt[i]++;
      // equal values: both R1 copies enabled, the commit stage keeps one
      if (dut.u_gcd.g_phb[i].u_phb.f1ab && dut.u_gcd.g_phb[i].u_phb.f1ba) cm_cnt[i]++;
    end
  end
  always @(posedge gcd_done or posedge gsp_done or posedge psp_done or posedge ms_done) n_quiet_end++;

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stimulus and checks ----------------
  int gcd_exp, ms_vals [$];
  int gm_nums [11], iv_lo [6], iv_hi [6];

  initial begin
    int base;
    base = 7 * $urandom_range(1, 5);
    gcd_exp = 0;
    for (int i = 0; i < N; i++) begin
      int v;
      v = base * $urandom_range(1, 150);
      gcd_query[i] = '{1'b1, 16'(v)};
      gsp_query[i] = '{1'b1, 16'(v)};
      gcd_exp = (gcd_exp == 0) ? v : gcd_ref(gcd_exp, v);
    end
    gcd_query[9].valid = 1'b0;  // an empty slot
    gsp_query[9].valid = 1'b0;
    gcd_query[20].n = '0;       // a zero, removed by R0
    gcd_exp = 0;
    for (int i = 0; i < N; i++) if (gcd_query[i].valid && gcd_query[i].n != 0)
      gcd_exp = (gcd_exp == 0) ? int'(gcd_query[i].n) : gcd_ref(gcd_exp, int'(gcd_query[i].n));
    for (int i = 0; i < N; i++) begin
      psp_query[i] = '{1'b1, 16'(i + 2)};
      pmp_query[i] = '{1'b1, 16'(N + 1 - i)};
    end
    ms_vals.delete();
    while (ms_vals.size() < N) begin
      int v; v = $urandom_range(1, 65000);
      if (!(v inside {ms_vals})) ms_vals.push_back(v);
    end
    for (int i = 0; i < N; i++) begin
      ms_query[i]  = '{1'b1, MS_SEQ, 16'd1, 16'(ms_vals[i])};
      mso_query[i] = ms_query[i];
    end
    ms_vals.sort();

    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    gcd_start = 1; gsp_start = 1; psp_start = 1; pmp_start = 1; ms_start = 1; mso_start = 1;
    @(negedge clk);
    gcd_start = 0; gsp_start = 0; psp_start = 0; pmp_start = 0; ms_start = 0; mso_start = 0;

    fork
      begin : t_gcd
        int nv, val;
        wait (gcd_done);
        nv = 0; val = 0;
        for (int i = 0; i < N; i++) if (gcd_result[i].valid) begin nv++; val = gcd_result[i].n; end
        check(nv == 1 && val == gcd_exp, $sformatf("gcd %0d (%0d cells) expected %0d", val, nv, gcd_exp));
        $display("gcd: %0d rounds", gcd_rounds);
      end
      begin : t_gsp
        int nv, val, g;
        wait (gsp_done);
        g = 0;
        for (int i = 0; i < N; i++) if (gsp_query[i].valid) g = (g == 0) ? int'(gsp_query[i].n) : gcd_ref(g, int'(gsp_query[i].n));
        nv = 0; val = 0;
        for (int i = 0; i < N; i++) if (gsp_result[i].valid) begin nv++; val = gsp_result[i].n; end
        check(nv == 1 && val == g, $sformatf("gcd SP %0d expected %0d", val, g));
        $display("gcd SP: %0d rounds, %0d shifts", gsp_rounds, gsp_shifts);
      end
      begin : t_psp
        wait (psp_done);
        for (int i = 0; i < N; i++) check(psp_result[i].valid == is_prime(int'(psp_result[i].n)), "prime SP");
        $display("prime SP: %0d rounds, %0d shifts", psp_rounds, psp_shifts);
      end
      begin : t_pmp
        wait (pmp_done);
        for (int i = 0; i < N; i++) check(pmp_result[i].valid == is_prime(int'(pmp_result[i].n)), "prime MP");
        $display("prime MP: %0d steps", pmp_steps);
      end
      begin : t_ms
        int narc;
        wait (ms_done);
        narc = 0;
        for (int i = 0; i < N; i++) if (ms_result[i].valid && ms_result[i].kind == MS_ARC) begin
          int j;
          narc++;
          j = 0;
          while (j < N - 1 && ms_vals[j] != int'(ms_result[i].x)) j++;
          check(int'(ms_result[i].y) == ms_vals[j+1], "merge sort arc links neighbours");
        end
        check(narc == N - 1, $sformatf("merge sort: %0d arcs", narc));
        $display("merge sort: %0d rounds", ms_rounds);
      end
      begin : t_mso
        int narc;
        wait (mso_done);
        narc = 0;
        for (int i = 0; i < N; i++) if (mso_arcs[i].valid) begin
          int j;
          narc++;
          j = 0;
          while (j < N - 1 && ms_vals[j] != int'(mso_arcs[i].x)) j++;
          check(int'(mso_arcs[i].y) == ms_vals[j+1], "online merge sort arc links neighbours");
        end
        check(narc == N - 1 && mso_arcs_moved == N - 1, $sformatf("online merge sort: %0d arcs", narc));
        $display("online merge sort: rounds %0d/%0d, FIFO peak %0d", mso_rounds1, mso_rounds2, mso_fifo_peak);
      end
      begin : t_gm
        gm_c_t r [$];
        for (int i = 0; i < 11; i++) gm_nums[i] = $urandom_range(1, 255);
        for (int x = 0; x < 11; x++)
          for (int y = x; y < 11; y++) begin
            @(negedge clk) gm_in_valid = 1; gm_in_data = '{1'b1, 8'(x), 8'(y), 8'(gm_nums[x])};
            if (y != x) begin
              @(negedge clk) gm_in_data = '{1'b1, 8'(x), 8'(y), 8'(gm_nums[y])};
            end
          end
        @(negedge clk) gm_in_valid = 0; gm_go = 1;
        @(negedge clk) gm_go = 0;
        while (!gm_out_last) begin
          @(posedge clk);
          if (gm_out_valid) r.push_back(gm_out_data);
        end
        check(r.size() == 66, $sformatf("gcd matrix: %0d results", r.size()));
        foreach (r[i]) check(int'(r[i].n) == gcd_ref(gm_nums[r[i].x], gm_nums[r[i].y]), "gcd matrix entry");
        $display("gcd matrix: %0d rounds", gm_rounds);
      end
      begin : t_iv
        iv_c_t r [$];
        for (int v = 0; v < 6; v++) begin iv_lo[v] = 0; iv_hi[v] = 65535; end
        for (int i = 0; i < 120; i++) begin
          int v, a, b;
          v = i % 6; a = $urandom_range(0, 1000); b = a + $urandom_range(1000, 5000);
          if (a > iv_lo[v]) iv_lo[v] = a;
          if (b < iv_hi[v]) iv_hi[v] = b;
          @(negedge clk) iv_in_valid = 1; iv_in_data = '{1'b1, 8'(v), 16'(a), 16'(b)};
        end
        @(negedge clk) iv_in_valid = 0; iv_go = 1;
        @(negedge clk) iv_go = 0;
        while (!iv_out_last) begin
          @(posedge clk);
          if (iv_out_valid) r.push_back(iv_out_data);
        end
        check(r.size() == 6, $sformatf("intervals: %0d results", r.size()));
        foreach (r[i]) check(int'(r[i].lo) == iv_lo[r[i].v] && int'(r[i].hi) == iv_hi[r[i].v], "interval");
        $display("intervals: %0d rounds", iv_rounds);
      end
    join

    foreach (r0_cnt[i]) begin n_r0 += r0_cnt[i]; n_r1 += r1_cnt[i]; n_commit += cm_cnt[i]; end
    $display("mechanisms: R0 %0d, R1 %0d, commit conflicts %0d, barrier waits %0d, quiet ends %0d",
             n_r0, n_r1, n_commit, n_barrier, n_quiet_end);
    $display("            shift-until-valid %0d, MP votes %0d, online overlaps %0d, unload skips %0d, FIFO transfers %0d",
             n_seek, n_vote, n_hold, n_skip, mso_arcs_moved);
    check(n_r0 > 0, "R0 removal happened");
    check(n_r1 > 0, "R1 rewrite happened");
    check(n_commit > 0, "commit chose between conflicting rules");
    check(n_barrier > 0, "barrier waited on a slow PHB");
    check(n_quiet_end >= 4, "quiet sweeps ended the runs");
    check(n_seek > 0, "shift-until-valid happened");
    check(n_vote > 0, "massive-parallel vote happened");
    check(n_hold > 0, "second merge executor merged arcs while the first still ran");
    check(n_skip > 0, "unload skipped removed cells");
    check(mso_arcs_moved > 0, "arcs crossed the FIFO");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
