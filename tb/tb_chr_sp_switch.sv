// Self-checking test of the strong-parallel shift-register switch on its own.
// PHBs are modelled here: each finishes after a random delay of 1..4 clocks
// and implements "remove the second constraint if the read one divides it",
// a rule that needs the read constraint to be broadcast correctly. Checks:
// at every load cell 0 is valid and is what every PHB sees as read input;
// every PHB sees its own cell; the final store keeps exactly the values of
// 4..N+1 with no proper divisor in that range (cells holding 2 and 3 are
// empty at start, which also exercises the shift-until-valid step); `shifts` ends with a quiet rotation of N shifts.
module tb_chr_sp_switch;
  localparam int N = 12, P = N - 1, CW = 9;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  logic [CW-1:0] query [N], cells [N], phb_read, phb_rem [P], res_rem [P];
  logic busy, done, phb_load;
  logic [31:0] rounds, shifts;
  logic [P-1:0] fin, chg;
  int seek_shifts;

  chr_sp_switch #(.CW(CW), .N(N)) dut (
    .clk, .rst_n, .start, .query, .busy, .done, .cells, .rounds, .shifts,
    .phb_load, .phb_read, .phb_rem, .res_rem, .phb_finish(fin), .phb_changed(chg)
  );
  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  for (genvar i = 0; i < P; i++) begin : g_model
    int cnt;
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        fin[i] <= 1'b0; chg[i] <= 1'b0; cnt <= 0; res_rem[i] <= '0;
      end else if (phb_load) begin
        logic kill;
        kill = phb_read[8] && phb_rem[i][8] && (phb_rem[i][7:0] % phb_read[7:0] == 0);
        res_rem[i] <= kill ? {1'b0, phb_rem[i][7:0]} : phb_rem[i];
        chg[i]     <= kill;
        fin[i]     <= 1'b0;
        cnt        <= $urandom_range(1, 4);
      end else if (cnt > 0) begin
        cnt <= cnt - 1;
        if (cnt == 1) fin[i] <= 1'b1;
      end
    end
  end

  always @(posedge clk) if (rst_n && phb_load) begin
    check(cells[0][8] && phb_read == cells[0], "read constraint valid and broadcast");
    for (int i = 0; i < P; i++) check(phb_rem[i] == cells[i+1], "removed input wiring");
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // query: 2..N+1, with cells 0 and 1 empty
    for (int i = 0; i < N; i++) query[i] = {(i > 1), 8'(i + 2)};
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    wait (done);
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      int v;
      logic prime;
      v = int'(cells[i][7:0]);
      // survivors: no proper divisor among the query values 4..N+1
      // (cells 2 and 3 started empty)
      prime = (v >= 4);
      for (int d = 4; d < v; d++) if (v % d == 0) prime = 0;
      check(cells[i][8] == prime, $sformatf("cell value %0d valid %0d", v, cells[i][8]));
    end
    check(shifts >= N, "final quiet rotation");
    check(rounds > 0, "rounds counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
