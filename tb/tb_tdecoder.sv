// Self-checking testbench for the ternary decoder: for each trit exactly the
// line with its number must be 2 and the others 0.
module tb_tdecoder;
  import ternary_pkg::*;

  logic        clk = 1'b0;
  trit_t       a;
  trit_t [2:0] x;
  int          checks = 0, failures = 0;

  tdecoder dut (.a(a), .x(x));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 3; v++) begin
      a = trit_t'(v);
      @(posedge clk);
      for (int k = 0; k < 3; k++) begin
        checks++;
        if (int'(x[k]) != ((k == v) ? 2 : 0)) begin
          failures++;
          $display("FAIL a=%0d x[%0d]=%0d", v, k, x[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
