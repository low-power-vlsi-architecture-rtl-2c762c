// N-input ternary OR (maximum of the inputs), built as a ternary NOR followed
// by a simple ternary inverter, the way the multiplexer builds its output
// stage. Combinational.
module tor
  import ternary_pkg::*;
#(
  parameter int unsigned N = 2
) (
  input  trit_t [N-1:0] a,
  output trit_t         y
);

  trit_t n;

  tnor #(.N(N)) u_nor (.a(a), .y(n));
  sti           u_inv (.a(n), .y(y));

endmodule
