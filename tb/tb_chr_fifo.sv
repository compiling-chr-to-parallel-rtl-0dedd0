// Self-checking test of the FIFO against a queue model: random pushes and
// pops (never past full or empty) at DEPTH = 8, checking head data, count,
// full and empty on every clock, including long runs at full.
module tb_chr_fifo;
  localparam int CW = 12, DEPTH = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, push = 0, pop = 0, full, empty;
  logic [CW-1:0] wr_data = '0, rd_data;
  logic [$clog2(DEPTH):0] count;
  logic [CW-1:0] model [$];

  chr_fifo #(.CW(CW), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 3000; t++) begin
      int bias;
      bias = ((t / 300) % 2 == 0) ? 70 : 30;  // phases that fill and drain
      @(negedge clk);
      check(int'(count) == model.size(), "count");
      check(full == (model.size() == DEPTH) && empty == (model.size() == 0), "flags");
      if (model.size() > 0) check(rd_data == model[0], "head data");
      push    = (model.size() < DEPTH) && ($urandom_range(0, 99) < bias);
      pop     = (model.size() > 0) && ($urandom_range(0, 99) >= bias);
      wr_data = CW'($urandom);
      @(posedge clk);
      if (pop)  void'(model.pop_front());
      if (push) model.push_back(wr_data);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
