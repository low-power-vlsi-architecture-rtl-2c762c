// Ternary decoder: one trit in, three unary lines out.
//
// x[k] is 2 when a == k and 0 otherwise, so exactly one line is high. Built
// as in the reference schematic: x[0] = NTI(a), x[2] = NTI(PTI(a)), and
// x[1] = NOR(x[0], x[2]), which is high only when neither end value is
// present. The unary lines only ever take the two extreme levels, which is
// what lets AND/OR networks use them as select terms. Combinational.
module tdecoder
  import ternary_pkg::*;
(
  input  trit_t       a,
  output trit_t [2:0] x
);

  trit_t p;

  nti  u_nti0 (.a(a), .y(x[0]));
  pti  u_pti  (.a(a), .y(p));
  nti  u_nti2 (.a(p), .y(x[2]));
  tnor #(.N(2)) u_nor (.a({x[2], x[0]}), .y(x[1]));

endmodule
