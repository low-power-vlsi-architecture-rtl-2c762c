// Self-checking testbench for the canonical element generator.
// GF(3^2): all nine element numbers against the published element table,
// written out here. GF(3^4): all 81 numbers against the reference model,
// a few rows against the published table, and a check that the 80 non-zero
// outputs are all different (alpha is primitive).
module tb_gf_elem_canon;
  import ternary_pkg::*;
  import gf_ref_pkg::*;

  logic          clk = 1'b0;
  trit_t [1:0]   idx2, y2;
  trit_t [3:0]   idx4, y4;
  int            checks = 0, failures = 0;

  // GF(3^2) table: {coefficient of alpha, constant} for numbers 0..8.
  localparam int EXP9_1[9] = '{0, 0, 1, 2, 2, 0, 2, 1, 1};
  localparam int EXP9_0[9] = '{0, 1, 0, 1, 2, 2, 0, 2, 1};

  // Printed rows of the GF(3^4) table: exponent and vector, alpha^0 first.
  localparam int ROW_E[7]    = '{4, 5, 6, 13, 40, 58, 79};
  localparam int ROW_V[7][4] = '{'{1,2,0,0}, '{0,1,2,0}, '{0,0,1,2}, '{2,2,0,0},
                                 '{2,0,0,0}, '{0,1,0,2}, '{1,0,0,1}};

  gf_elem_canon dut2 (.idx(idx2), .y(y2));
  gf_elem_canon #(.M(4), .P({T0, T0, T1, T2})) dut4 (.idx(idx4), .y(y4));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int as_num(trit_t [3:0] v);
    return int'(v[0]) + 3 * int'(v[1]) + 9 * int'(v[2]) + 27 * int'(v[3]);
  endfunction

  initial begin
    vec_t p81, e;
    bit   seen[81];
    p81 = '{2, 1, 0, 0};
    for (int n = 0; n < 81; n++) seen[n] = 1'b0;

    for (int n = 0; n < 9; n++) begin
      idx2 = {trit_t'(n / 3), trit_t'(n % 3)};
      @(posedge clk);
      checks++;
      if (int'(y2[1]) != EXP9_1[n] || int'(y2[0]) != EXP9_0[n]) begin
        failures++;
        $display("FAIL GF(9) number %0d gave %0d%0d", n, y2[1], y2[0]);
      end
    end

    for (int n = 0; n < 81; n++) begin
      idx4 = {trit_t'(n / 27), trit_t'((n / 9) % 3), trit_t'((n / 3) % 3), trit_t'(n % 3)};
      @(posedge clk);
      e = gf_elem(n, 4, p81);
      checks++;
      if (int'(y4[0]) != e[0] || int'(y4[1]) != e[1] ||
          int'(y4[2]) != e[2] || int'(y4[3]) != e[3]) begin
        failures++;
        $display("FAIL GF(81) number %0d gave %0d%0d%0d%0d", n, y4[0], y4[1], y4[2], y4[3]);
      end
      for (int r = 0; r < 7; r++)
        if (n == ROW_E[r] + 1) begin
          checks++;
          if (int'(y4[0]) != ROW_V[r][0] || int'(y4[1]) != ROW_V[r][1] ||
              int'(y4[2]) != ROW_V[r][2] || int'(y4[3]) != ROW_V[r][3]) begin
            failures++;
            $display("FAIL alpha^%0d row", ROW_E[r]);
          end
        end
      if (n > 0) begin
        checks++;
        if (seen[as_num(y4)] || as_num(y4) == 0) begin
          failures++;
          $display("FAIL number %0d repeats an element", n);
        end
        seen[as_num(y4)] = 1'b1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
