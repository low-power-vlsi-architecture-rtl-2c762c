// Two-input ternary XOR: y = max(min(STI(a), b), min(a, STI(b))).
//
// Built from four 2-input ternary NANDs in the classic arrangement
// n1 = NAND(a,b), n2 = NAND(a,n1), n3 = NAND(b,n1), y = NAND(n2,n3). With
// NAND = 2 - min this gives the ternary XOR table: 0 for equal end values
// (0,0) and (2,2), 1 whenever either input is 1, and 2 for (0,2) and (2,0).
// Combinational.
module txor
  import ternary_pkg::*;
(
  input  trit_t a,
  input  trit_t b,
  output trit_t y
);

  trit_t n1, n2, n3;

  tnand #(.N(2)) u_n1 (.a({b, a}),   .y(n1));
  tnand #(.N(2)) u_n2 (.a({n1, a}),  .y(n2));
  tnand #(.N(2)) u_n3 (.a({n1, b}),  .y(n3));
  tnand #(.N(2)) u_n4 (.a({n3, n2}), .y(y));

endmodule
