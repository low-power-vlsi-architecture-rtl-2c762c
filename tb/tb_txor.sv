// Self-checking testbench for the ternary XOR. The reference is the
// published truth table, written out row by row (not derived from gates).
module tb_txor;
  import ternary_pkg::*;

  logic  clk = 1'b0;
  trit_t a, b, y;
  int    checks = 0, failures = 0;

  // Expected y for (a, b) = 00, 01, 02, 10, 11, 12, 20, 21, 22.
  localparam int EXP[9] = '{0, 1, 2, 1, 1, 1, 2, 1, 0};

  txor dut (.a(a), .b(b), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 9; n++) begin
      a = trit_t'(n / 3);
      b = trit_t'(n % 3);
      @(posedge clk);
      checks++;
      if (int'(y) != EXP[n]) begin
        failures++;
        $display("FAIL a=%0d b=%0d y=%0d expected %0d", n / 3, n % 3, y, EXP[n]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
