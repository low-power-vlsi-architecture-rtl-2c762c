// Negative ternary inverter (NTI): 2 for input 0, 0 for inputs 1 and 2.
//
// The reference cell is a high-threshold pMOS over a low-threshold nMOS, so
// the output falls as soon as the input leaves 0. Here only the logic
// function is kept, on the 2-bit trit code. Combinational.
module nti
  import ternary_pkg::*;
(
  input  trit_t a,
  output trit_t y
);

  always_comb y = (t_sat(a) == T0) ? T2 : T0;

endmodule
