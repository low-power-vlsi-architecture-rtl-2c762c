// N-input ternary NAND: y = 2 - min(a[0], ..., a[N-1]).
//
// Ternary AND is the minimum of its inputs and NAND its STI complement. The
// reference cell is a 2-input forced-stack multi-threshold gate (parallel
// pull-up, series pull-down); the 3-input form is used by the sum-of-products
// element generators. N is a parameter here so one module serves both; wider
// N is this library's generalisation. Combinational.
module tnand
  import ternary_pkg::*;
#(
  parameter int unsigned N = 2
) (
  input  trit_t [N-1:0] a,
  output trit_t         y
);

  trit_t m;

  always_comb begin
    m = T2;
    for (int unsigned i = 0; i < N; i++) m = t_min(m, a[i]);
    y = T2 - m;
  end

endmodule
