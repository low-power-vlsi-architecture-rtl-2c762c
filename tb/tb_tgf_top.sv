// End-to-end testbench for the ternary Galois field adder system, run with
// the top at its defaults.
// GF(3^2): every pair of element numbers under every select combination.
// GF(3^4): every pair of the 81 element numbers, the selects cycling.
// The chosen numbers go into the selected candidate slots, the other slots
// get random numbers. Expected operands and sums come from the reference
// model (square-and-multiply powers of alpha, coefficient-wise addition).
// Counted mechanisms, each of which must occur at least once: the five
// switch paths of the modulo-3 cells (plain XOR, PTI for 1+1, NTI for 1+2
// and 2+1, PTI-and-1 for 2+2), each operand-select value, a zero operand,
// and a sum that cancels to zero.
module tb_tgf_top;
  import ternary_pkg::*;
  import gf_ref_pkg::*;

  logic             clk = 1'b0;
  trit_t [2:0][1:0] gf9_a_idx, gf9_b_idx;
  trit_t            gf9_a_sel, gf9_b_sel;
  trit_t [1:0]      gf9_a, gf9_b, gf9_sum;
  trit_t [2:0][3:0] gf81_a_idx, gf81_b_idx;
  trit_t            gf81_a_sel, gf81_b_sel;
  trit_t [3:0]      gf81_a, gf81_b, gf81_sum;

  int checks = 0, failures = 0;
  int n_path[5];            // xor, 1+1, 1+2, 2+1, 2+2
  int n_sel[3];
  int n_zero_op = 0, n_zero_sum = 0;

  tgf_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic trit_t [3:0] num4(int n);
    return {trit_t'(n / 27), trit_t'((n / 9) % 3), trit_t'((n / 3) % 3), trit_t'(n % 3)};
  endfunction

  function automatic trit_t [1:0] num2(int n);
    return {trit_t'(n / 3), trit_t'(n % 3)};
  endfunction

  function automatic void count_paths(vec_t a, vec_t b, int m);
    for (int i = 0; i < m; i++)
      if      (a[i] == 1 && b[i] == 1) n_path[1]++;
      else if (a[i] == 1 && b[i] == 2) n_path[2]++;
      else if (a[i] == 2 && b[i] == 1) n_path[3]++;
      else if (a[i] == 2 && b[i] == 2) n_path[4]++;
      else                             n_path[0]++;
  endfunction

  initial begin
    vec_t p9, p81, ea, eb, es;
    p9  = '{2, 1, 0, 0};
    p81 = '{2, 1, 0, 0};
    for (int i = 0; i < 5; i++) n_path[i] = 0;
    for (int i = 0; i < 3; i++) n_sel[i] = 0;
    gf81_a_idx = '0; gf81_b_idx = '0; gf81_a_sel = T0; gf81_b_sel = T0;

    // GF(3^2), exhaustive
    for (int na = 0; na < 9; na++)
      for (int nb = 0; nb < 9; nb++)
        for (int s = 0; s < 9; s++) begin
          for (int j = 0; j < 3; j++) begin
            gf9_a_idx[j] = num2($urandom_range(8));
            gf9_b_idx[j] = num2($urandom_range(8));
          end
          gf9_a_idx[s % 3] = num2(na);
          gf9_b_idx[s / 3] = num2(nb);
          gf9_a_sel = trit_t'(s % 3);
          gf9_b_sel = trit_t'(s / 3);
          @(posedge clk);
          ea = gf_elem(na, 2, p9);
          eb = gf_elem(nb, 2, p9);
          es = gf_add(ea, eb);
          checks++;
          if (int'(gf9_a[0]) != ea[0] || int'(gf9_a[1]) != ea[1] ||
              int'(gf9_b[0]) != eb[0] || int'(gf9_b[1]) != eb[1] ||
              int'(gf9_sum[0]) != es[0] || int'(gf9_sum[1]) != es[1]) begin
            failures++;
            $display("FAIL GF(9) %0d + %0d: sum %0d%0d expected %0d%0d",
                     na, nb, gf9_sum[0], gf9_sum[1], es[0], es[1]);
          end
          count_paths(ea, eb, 2);
          n_sel[s % 3]++;
          if (na == 0 || nb == 0) n_zero_op++;
          if (es[0] == 0 && es[1] == 0) n_zero_sum++;
        end

    // GF(3^4), every pair of element numbers
    for (int na = 0; na < 81; na++)
      for (int nb = 0; nb < 81; nb++) begin
        int sa, sb;
        sa = (na + nb) % 3;
        sb = nb % 3;
        for (int j = 0; j < 3; j++) begin
          gf81_a_idx[j] = num4($urandom_range(80));
          gf81_b_idx[j] = num4($urandom_range(80));
        end
        gf81_a_idx[sa] = num4(na);
        gf81_b_idx[sb] = num4(nb);
        gf81_a_sel = trit_t'(sa);
        gf81_b_sel = trit_t'(sb);
        #1;
        ea = gf_elem(na, 4, p81);
        eb = gf_elem(nb, 4, p81);
        es = gf_add(ea, eb);
        checks++;
        for (int i = 0; i < 4; i++)
          if (int'(gf81_a[i]) != ea[i] || int'(gf81_b[i]) != eb[i] ||
              int'(gf81_sum[i]) != es[i]) begin
            failures++;
            $display("FAIL GF(81) %0d + %0d at trit %0d: sum %0d expected %0d",
                     na, nb, i, gf81_sum[i], es[i]);
            break;
          end
        count_paths(ea, eb, 4);
        n_sel[sa]++;
        if (na == 0 || nb == 0) n_zero_op++;
        if (es[0] == 0 && es[1] == 0 && es[2] == 0 && es[3] == 0) n_zero_sum++;
        if (nb == 80) @(posedge clk);
      end

    // the worked GF(3^4) example: alpha^5 + alpha^6 = alpha^58
    gf81_a_idx[0] = num4(6);
    gf81_b_idx[0] = num4(7);
    gf81_a_sel = T0; gf81_b_sel = T0;
    @(posedge clk);
    checks++;
    if (gf81_sum != {T2, T0, T1, T0}) begin   // (0,1,0,2), alpha^0 first
      failures++;
      $display("FAIL alpha^5 + alpha^6");
    end

    $display("switch paths: xor=%0d pti(1+1)=%0d nti(1+2)=%0d nti(2+1)=%0d pti-and(2+2)=%0d",
             n_path[0], n_path[1], n_path[2], n_path[3], n_path[4]);
    $display("selects: 0=%0d 1=%0d 2=%0d  zero operand=%0d  zero sum=%0d",
             n_sel[0], n_sel[1], n_sel[2], n_zero_op, n_zero_sum);
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (n_path[i] == 0) begin failures++; $display("FAIL switch path %0d never taken", i); end
    end
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (n_sel[i] == 0) begin failures++; $display("FAIL select %0d never used", i); end
    end
    checks += 2;
    if (n_zero_op == 0)  failures++;
    if (n_zero_sum == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
