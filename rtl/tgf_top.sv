// Ternary Galois field adder system: element generators feeding GF adders.
//
// Two independent datapaths of the same shape, one over GF(3^2) and one over
// GF(3^4). In each, operands are given as element numbers (0 = zero element,
// k = alpha^(k-1)); canonical sum-of-products generators turn every number
// into its vector form, and a GF adder built from modulo-3 adder cells adds
// the two selected vectors. Each operand has three candidate numbers, one
// per input of the adder cells' operand multiplexers, and a select trit
// picking one of them.
//   GF(3^2): p(x) = x^2 + x + 2, 2-trit numbers and vectors.
//   GF(3^4): p(x) = x^4 + x + 2, 4-trit numbers and vectors.
// All trits use the 2-bit code of ternary_pkg. The selected operands' vector
// forms are brought out next to the sum. Purely combinational, no clock.
module tgf_top
  import ternary_pkg::*;
(
  // GF(3^2)
  input  trit_t [2:0][1:0] gf9_a_idx,
  input  trit_t            gf9_a_sel,
  input  trit_t [2:0][1:0] gf9_b_idx,
  input  trit_t            gf9_b_sel,
  output trit_t [1:0]      gf9_a,
  output trit_t [1:0]      gf9_b,
  output trit_t [1:0]      gf9_sum,
  // GF(3^4)
  input  trit_t [2:0][3:0] gf81_a_idx,
  input  trit_t            gf81_a_sel,
  input  trit_t [2:0][3:0] gf81_b_idx,
  input  trit_t            gf81_b_sel,
  output trit_t [3:0]      gf81_a,
  output trit_t [3:0]      gf81_b,
  output trit_t [3:0]      gf81_sum
);

  localparam trit_t [1:0] P9  = {T1, T2};           // x^2 + x + 2
  localparam trit_t [3:0] P81 = {T0, T0, T1, T2};   // x^4 + x + 2

  trit_t [2:0][1:0] gf9_a_vec, gf9_b_vec;
  trit_t [2:0][3:0] gf81_a_vec, gf81_b_vec;

  for (genvar j = 0; j < 3; j++) begin : g_gen
    gf_elem_canon #(.M(2), .P(P9))  u_gf9_a  (.idx(gf9_a_idx[j]),  .y(gf9_a_vec[j]));
    gf_elem_canon #(.M(2), .P(P9))  u_gf9_b  (.idx(gf9_b_idx[j]),  .y(gf9_b_vec[j]));
    gf_elem_canon #(.M(4), .P(P81)) u_gf81_a (.idx(gf81_a_idx[j]), .y(gf81_a_vec[j]));
    gf_elem_canon #(.M(4), .P(P81)) u_gf81_b (.idx(gf81_b_idx[j]), .y(gf81_b_vec[j]));
  end

  gf_adder #(.M(2)) u_add9 (
    .a_in(gf9_a_vec), .a_sel(gf9_a_sel), .b_in(gf9_b_vec), .b_sel(gf9_b_sel),
    .a(gf9_a), .b(gf9_b), .sum(gf9_sum)
  );

  gf_adder #(.M(4)) u_add81 (
    .a_in(gf81_a_vec), .a_sel(gf81_a_sel), .b_in(gf81_b_vec), .b_sel(gf81_b_sel),
    .a(gf81_a), .b(gf81_b), .sum(gf81_sum)
  );

endmodule
