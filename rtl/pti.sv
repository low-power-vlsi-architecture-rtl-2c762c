// Positive ternary inverter (PTI): 2 for inputs 0 and 1, 0 for input 2.
//
// The reference cell is a low-threshold pMOS over a high-threshold nMOS, so
// the output only falls once the input reaches the top level. Here only the
// logic function is kept, on the 2-bit trit code. Combinational.
module pti
  import ternary_pkg::*;
(
  input  trit_t a,
  output trit_t y
);

  always_comb y = (t_sat(a) == T2) ? T0 : T2;

endmodule
