// Self-checking testbench for the ternary 3:1 multiplexer: every data
// combination under every select value, output compared with d[s].
module tb_tmux3;
  import ternary_pkg::*;

  logic        clk = 1'b0;
  trit_t [2:0] d;
  trit_t       s, y;
  int          checks = 0, failures = 0;

  tmux3 dut (.d(d), .s(s), .y(y));

  always #5 clk = ~clk;

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
      d = {trit_t'(v[2]), trit_t'(v[1]), trit_t'(v[0])};
      for (int sv = 0; sv < 3; sv++) begin
        s = trit_t'(sv);
        #1;
        checks++;
        if (int'(y) != v[sv]) begin
          failures++;
          $display("FAIL d=%0d%0d%0d s=%0d y=%0d", v[2], v[1], v[0], sv, y);
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
