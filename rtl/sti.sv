// Simple ternary inverter (STI): y = 2 - a.
//
// Truth table 0->2, 1->1, 2->0. The reference cell is a forced-stack,
// multi-threshold CMOS inverter whose middle output level comes from a
// voltage divider between a low-threshold and a high-threshold pair; here
// only its logic function is kept, on the 2-bit trit code of ternary_pkg.
// Purely combinational, no clock.
module sti
  import ternary_pkg::*;
(
  input  trit_t a,
  output trit_t y
);

  always_comb y = T2 - t_sat(a);

endmodule
