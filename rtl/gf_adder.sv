// GF(3^M) adder: adds two field elements in vector form.
//
// Addition in GF(3^M) is coefficient-wise addition modulo 3 with no carry,
// so the adder is M independent modulo-3 adder cells, one per coefficient.
// Each cell carries its own operand multiplexers: a_in[c] and b_in[c] are
// three candidate vectors per operand, and a_sel / b_sel (shared by all
// cells here) pick which candidate of each is added. The default is the
// four-cell GF(3^4) adder; M = 2 gives the GF(3^2) adder.
// Example in GF(3^4): alpha^5 = (0,1,2,0) plus alpha^6 = (0,0,1,2), listed
// from the alpha^0 coefficient up, gives (0,1,0,2) = alpha^58.
// Purely combinational, no clock.
module gf_adder
  import ternary_pkg::*;
#(
  parameter int unsigned M = 4
) (
  input  trit_t [2:0][M-1:0] a_in,   // three candidate vectors for A
  input  trit_t              a_sel,
  input  trit_t [2:0][M-1:0] b_in,   // three candidate vectors for B
  input  trit_t              b_sel,
  output trit_t [M-1:0]      a,      // selected A
  output trit_t [M-1:0]      b,      // selected B
  output trit_t [M-1:0]      sum     // A + B in GF(3^M)
);

  for (genvar i = 0; i < M; i++) begin : g_cell
    tmod_adder u_cell (
      .a_in  ({a_in[2][i], a_in[1][i], a_in[0][i]}),
      .a_sel (a_sel),
      .b_in  ({b_in[2][i], b_in[1][i], b_in[0][i]}),
      .b_sel (b_sel),
      .a     (a[i]),
      .b     (b[i]),
      .sum   (sum[i])
    );
  end

endmodule
