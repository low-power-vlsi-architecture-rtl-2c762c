// Self-checking testbench for the GF(3^M) adder, default (GF(3^4)) and
// M = 2. Random candidate vectors under all nine select combinations are
// compared with the coefficient-wise modulo-3 sum of the selected vectors;
// the two worked examples (alpha^5 + alpha^6 = alpha^58 in GF(3^4),
// alpha^3 + alpha^4 = alpha^2 in GF(3^2)) are checked as well.
module tb_gf_adder;
  import ternary_pkg::*;

  logic              clk = 1'b0;
  trit_t [2:0][3:0]  a4_in, b4_in;
  trit_t [3:0]       a4, b4, s4;
  trit_t [2:0][1:0]  a2_in, b2_in;
  trit_t [1:0]       a2, b2, s2;
  trit_t             a_sel, b_sel;
  int                checks = 0, failures = 0;

  gf_adder dut4 (
    .a_in(a4_in), .a_sel(a_sel), .b_in(b4_in), .b_sel(b_sel),
    .a(a4), .b(b4), .sum(s4)
  );
  gf_adder #(.M(2)) dut2 (
    .a_in(a2_in), .a_sel(a_sel), .b_in(b2_in), .b_sel(b_sel),
    .a(a2), .b(b2), .sum(s2)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check4(int exp[4], string what);
    checks++;
    for (int i = 0; i < 4; i++)
      if (int'(s4[i]) != exp[i]) begin
        failures++;
        $display("FAIL %s: sum trit %0d = %0d, expected %0d", what, i, s4[i], exp[i]);
        break;
      end
  endtask

  initial begin
    int e4[4];
    int ex[4];
    // worked example in GF(3^4), vectors alpha^0 first
    a4_in = '0; b4_in = '0; a2_in = '0; b2_in = '0;
    a4_in[1] = {T0, T2, T1, T0};      // alpha^5 = (0,1,2,0)
    b4_in[2] = {T2, T1, T0, T0};      // alpha^6 = (0,0,1,2)
    a2_in[1] = {T2, T2};              // alpha^3 = 2 + 2 alpha
    b2_in[2] = {T0, T2};              // alpha^4 = 2
    a_sel = T1; b_sel = T2;
    @(posedge clk);
    ex = '{0, 1, 0, 2};               // alpha^58
    check4(ex, "alpha^5 + alpha^6");
    checks++;
    if (s2 != {T2, T1}) begin         // alpha^2 = 1 + 2 alpha
      failures++;
      $display("FAIL alpha^3 + alpha^4 in GF(9) gave %0d%0d", s2[0], s2[1]);
    end

    for (int it = 0; it < 400; it++) begin
      for (int j = 0; j < 3; j++) begin
        for (int i = 0; i < 4; i++) begin
          a4_in[j][i] = trit_t'($urandom_range(2));
          b4_in[j][i] = trit_t'($urandom_range(2));
        end
        for (int i = 0; i < 2; i++) begin
          a2_in[j][i] = trit_t'($urandom_range(2));
          b2_in[j][i] = trit_t'($urandom_range(2));
        end
      end
      a_sel = trit_t'(it % 3);
      b_sel = trit_t'((it / 3) % 3);
      @(posedge clk);
      for (int i = 0; i < 4; i++)
        e4[i] = (int'(a4_in[it % 3][i]) + int'(b4_in[(it / 3) % 3][i])) % 3;
      check4(e4, "random GF(81)");
      checks++;
      if (a4 != a4_in[it % 3] || b4 != b4_in[(it / 3) % 3]) begin
        failures++;
        $display("FAIL operand select");
      end
      for (int i = 0; i < 2; i++) begin
        checks++;
        if (int'(s2[i]) != (int'(a2_in[it % 3][i]) + int'(b2_in[(it / 3) % 3][i])) % 3) begin
          failures++;
          $display("FAIL random GF(9) trit %0d", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
