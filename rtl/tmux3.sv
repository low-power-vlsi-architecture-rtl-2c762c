// Ternary 3:1 multiplexer: y = d[s] for a select trit s.
//
// Computes Y = S0*A + S1*B + S2*C with ternary AND (min) and OR (max). A
// ternary decoder turns s into unary lines S0..S2 (each 0 or 2); each data
// trit is ANDed with its line by a 2-input NAND followed by an STI, and the
// three products are ORed by a 3-input NOR followed by an STI. Because a
// select line is 0 or 2, min(line, data) is either 0 or the data trit, and
// the maximum passes the selected one. Combinational.
module tmux3
  import ternary_pkg::*;
(
  input  trit_t [2:0] d,
  input  trit_t       s,
  output trit_t       y
);

  trit_t [2:0] sl;     // unary select lines
  trit_t [2:0] nd;     // NAND of data and select line
  trit_t [2:0] pr;     // products after the inverters
  trit_t       nr;

  tdecoder u_dec (.a(s), .x(sl));

  for (genvar k = 0; k < 3; k++) begin : g_term
    tnand #(.N(2)) u_nand (.a({sl[k], d[k]}), .y(nd[k]));
    sti            u_inv  (.a(nd[k]), .y(pr[k]));
  end

  tnor #(.N(3)) u_nor (.a(pr), .y(nr));
  sti           u_out (.a(nr), .y(y));

endmodule
