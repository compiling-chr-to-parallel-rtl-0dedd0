// Self-checking test of the Prime rule block: for all X in 0..40 and Y in
// 0..120 with random valid bits, Y must be removed exactly when both are
// valid, X /= 0 and X divides Y; the value and X are never changed.
module tb_rhb_prime;
  import chr_pkg::*;
  int checks = 0, failures = 0;
  prime_c_t x_in, y_in, y_out;
  logic fire;

  rhb_prime dut (.*);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x <= 40; x++)
      for (int y = 0; y <= 120; y++) begin
        logic vx, vy, e;
        vx = ($urandom_range(0, 7) != 0);
        vy = ($urandom_range(0, 7) != 0);
        x_in = '{valid: vx, n: 16'(x)};
        y_in = '{valid: vy, n: 16'(y)};
        #1;
        e = vx && vy && x != 0 && (y % (x == 0 ? 1 : x)) == 0;
        check(fire == e, $sformatf("fire x=%0d y=%0d", x, y));
        check(y_out.n == 16'(y) && y_out.valid == (vy && !e), "output");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
