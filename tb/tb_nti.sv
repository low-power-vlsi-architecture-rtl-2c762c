// Self-checking testbench for the negative ternary inverter: expected 2 only for input 0.
// Drives all three trits (and the non-trit code 3, which must read as 2)
// and compares with an integer model; a free-running clock times a watchdog.
module tb_nti;
  import ternary_pkg::*;

  logic  clk = 1'b0;
  trit_t a, y;
  int    checks = 0, failures = 0;

  nti dut (.a(a), .y(y));

  always #5 clk = ~clk;

  function automatic int model(int v);
    return (v == 0) ? 2 : 0;
  endfunction

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      a = trit_t'(v);
      @(posedge clk);
      checks++;
      if (int'(y) != model(v == 3 ? 2 : v)) begin
        failures++;
        $display("FAIL a=%0d y=%0d expected %0d", v, y, model(v == 3 ? 2 : v));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
