// N-input ternary AND (minimum of the inputs), built as a ternary NAND
// followed by a simple ternary inverter, the way the multiplexer builds its
// AND terms. Combinational.
module tand
  import ternary_pkg::*;
#(
  parameter int unsigned N = 2
) (
  input  trit_t [N-1:0] a,
  output trit_t         y
);

  trit_t n;

  tnand #(.N(N)) u_nand (.a(a), .y(n));
  sti            u_inv  (.a(n), .y(y));

endmodule
