// N-input ternary NOR: y = 2 - max(a[0], ..., a[N-1]).
//
// Ternary OR is the maximum of its inputs and NOR its STI complement. The
// reference cell is a 2-input forced-stack multi-threshold gate (series
// pull-up, parallel pull-down); the multiplexer uses a 3-input form. N is a
// parameter so one module serves every width. Combinational.
module tnor
  import ternary_pkg::*;
#(
  parameter int unsigned N = 2
) (
  input  trit_t [N-1:0] a,
  output trit_t         y
);

  trit_t m;

  always_comb begin
    m = T0;
    for (int unsigned i = 0; i < N; i++) m = t_max(m, a[i]);
    y = T2 - m;
  end

endmodule
