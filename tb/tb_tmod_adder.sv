// Self-checking testbench for the modulo-3 adder cell.
// For every (A, B) pair and every pair of select values, the chosen
// operands are placed in the selected candidate slots, the other slots get
// random trits, and the selected operands and the sum are compared with
// (A + B) mod 3 (the published modular-addition table). The five switch
// paths (plain XOR and the four repaired cases) are counted, and a path
// that is never taken counts as a failure. The four input sets of the
// published transient results are replayed under every select pair.
module tb_tmod_adder;
  import ternary_pkg::*;

  logic        clk = 1'b0;
  trit_t [2:0] a_in, b_in;
  trit_t       a_sel, b_sel, a, b, sum;
  int          checks = 0, failures = 0;
  int          n_pass = 0, n_11 = 0, n_12 = 0, n_21 = 0, n_22 = 0;

  // Published input sets: A0..A2 all FIG_A[c]; B0..B2 all FIG_B[c], except
  // set 0 where B0, B1, B2 = 0, 1, 2. Sums: B[b_sel], 2, 0, 1.
  localparam int FIG_A[4] = '{0, 1, 1, 2};
  localparam int FIG_B[4] = '{0, 1, 2, 2};

  tmod_adder dut (
    .a_in(a_in), .a_sel(a_sel), .b_in(b_in), .b_sel(b_sel),
    .a(a), .b(b), .sum(sum)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int va = 0; va < 3; va++)
      for (int vb = 0; vb < 3; vb++)
        for (int sa = 0; sa < 3; sa++)
          for (int sb = 0; sb < 3; sb++) begin
            for (int k = 0; k < 3; k++) begin
              a_in[k] = trit_t'($urandom_range(2));
              b_in[k] = trit_t'($urandom_range(2));
            end
            a_in[sa] = trit_t'(va);
            b_in[sb] = trit_t'(vb);
            a_sel    = trit_t'(sa);
            b_sel    = trit_t'(sb);
            @(posedge clk);
            checks += 3;
            if (int'(a) != va || int'(b) != vb) begin
              failures++;
              $display("FAIL operand select a=%0d/%0d b=%0d/%0d", a, va, b, vb);
            end
            if (int'(sum) != (va + vb) % 3) begin
              failures++;
              $display("FAIL %0d + %0d gave %0d", va, vb, sum);
            end
            if      (va == 1 && vb == 1) n_11++;
            else if (va == 1 && vb == 2) n_12++;
            else if (va == 2 && vb == 1) n_21++;
            else if (va == 2 && vb == 2) n_22++;
            else                         n_pass++;
          end
    // The four published input sets: all candidates of A, all of B.
    for (int c = 0; c < 4; c++)
      for (int sa = 0; sa < 3; sa++)
        for (int sb = 0; sb < 3; sb++) begin
          int ea, eb;
          for (int k = 0; k < 3; k++) begin
            a_in[k] = trit_t'(FIG_A[c]);
            b_in[k] = (c == 0) ? trit_t'(k) : trit_t'(FIG_B[c]);
          end
          a_sel = trit_t'(sa);
          b_sel = trit_t'(sb);
          @(posedge clk);
          ea = FIG_A[c];
          eb = (c == 0) ? sb : FIG_B[c];
          checks++;
          if (int'(sum) != (ea + eb) % 3) begin
            failures++;
            $display("FAIL input set %0d sa=%0d sb=%0d gave %0d", c, sa, sb, sum);
          end
        end
    $display("paths: xor=%0d pti(1,1)=%0d nti(1,2)=%0d nti(2,1)=%0d and(2,2)=%0d",
             n_pass, n_11, n_12, n_21, n_22);
    checks++;
    if (n_pass == 0 || n_11 == 0 || n_12 == 0 || n_21 == 0 || n_22 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
