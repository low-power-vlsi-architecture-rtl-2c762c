// Self-checking testbench for the N-input ternary AND (minimum).
// Runs every input combination of a 2-input and a 3-input instance
// against an integer model; a free-running clock times a watchdog.
module tb_tand;
  import ternary_pkg::*;

  logic         clk = 1'b0;
  trit_t [1:0]  a2;
  trit_t [2:0]  a3;
  trit_t        y2, y3;
  int           checks = 0, failures = 0;

  tand #(.N(2)) dut2 (.a(a2), .y(y2));
  tand #(.N(3)) dut3 (.a(a3), .y(y3));

  always #5 clk = ~clk;

  function automatic int model(int v[3], int n);
    int mn, mx;
    mn = 2; mx = 0;
    for (int i = 0; i < n; i++) begin
      if (v[i] < mn) mn = v[i];
      if (v[i] > mx) mx = v[i];
    end
    return mn;
  endfunction

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v[3];
    for (int n = 0; n < 27; n++) begin
      v[0] = n % 3; v[1] = (n / 3) % 3; v[2] = n / 9;
      a2 = {trit_t'(v[1]), trit_t'(v[0])};
      a3 = {trit_t'(v[2]), trit_t'(v[1]), trit_t'(v[0])};
      @(posedge clk);
      checks++;
      if (int'(y3) != model(v, 3)) begin
        failures++;
        $display("FAIL N=3 in=%0d%0d%0d y=%0d", v[2], v[1], v[0], y3);
      end
      if (n < 9) begin
        checks++;
        if (int'(y2) != model(v, 2)) begin
          failures++;
          $display("FAIL N=2 in=%0d%0d y=%0d", v[1], v[0], y2);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
