// Modulo-3 adder cell: sum = (A + B) mod 3 for one pair of trits, with a
// 3:1 operand multiplexer in front of each input.
//
// Operands. Each operand is picked from three candidate trits by a ternary
// 3:1 multiplexer (a_in[a_sel], b_in[b_sel]); the two multiplexer decoders
// are the two decoders of the cell. This front end follows the reference
// schematic of the cell, whose ports are three candidate inputs per operand.
//
// Sum. The ternary XOR of the operands already equals the modulo-3 sum in
// five of the nine input cases. The other four are repaired from the XOR
// value, which is 1 in three of them and 0 in the fourth:
//   (1,1): XOR = 1, sum 2 = PTI(XOR)
//   (1,2), (2,1): XOR = 1, sum 0 = NTI(XOR)
//   (2,2): XOR = 0, sum 1 = min(PTI(XOR), 1)
// so the cell holds one XOR, two PTIs, two NTIs and one AND. A switch then
// passes the XOR or one of the repaired values. How the switch is steered is
// not given by the reference; here two extra ternary decoders on the chosen
// operands recognise the four special cases, and the switch is a ternary
// AND-OR network of the five candidate values gated by those unary terms
// (the same form as the multiplexer). Those two decoders' zero lines are
// left unused, since no repair case involves an operand of 0.
// Purely combinational, no clock.
module tmod_adder
  import ternary_pkg::*;
(
  input  trit_t [2:0] a_in,   // candidate trits for operand A
  input  trit_t       a_sel,  // which candidate is A
  input  trit_t [2:0] b_in,   // candidate trits for operand B
  input  trit_t       b_sel,  // which candidate is B
  output trit_t       a,      // selected operand A
  output trit_t       b,      // selected operand B
  output trit_t       sum     // (a + b) mod 3
);

  // Operand multiplexers.
  tmux3 u_mux_a (.d(a_in), .s(a_sel), .y(a));
  tmux3 u_mux_b (.d(b_in), .s(b_sel), .y(b));

  // XOR and its repaired variants.
  trit_t x, p11, p22, n12, n21, q22;

  txor u_xor   (.a(a), .b(b), .y(x));
  pti  u_pti11 (.a(x), .y(p11));
  nti  u_nti12 (.a(x), .y(n12));
  nti  u_nti21 (.a(x), .y(n21));
  pti  u_pti22 (.a(x), .y(p22));
  tand #(.N(2)) u_and22 (.a({T1, p22}), .y(q22));

  // Switch control: unary case terms, each 0 or 2.
  trit_t [2:0] da, db;
  trit_t c11, c12, c21, c22, cpass;

  tdecoder u_dec_a (.a(a), .x(da));
  tdecoder u_dec_b (.a(b), .x(db));
  tand #(.N(2)) u_c11 (.a({db[1], da[1]}), .y(c11));
  tand #(.N(2)) u_c12 (.a({db[2], da[1]}), .y(c12));
  tand #(.N(2)) u_c21 (.a({db[1], da[2]}), .y(c21));
  tand #(.N(2)) u_c22 (.a({db[2], da[2]}), .y(c22));
  tnor #(.N(4)) u_cp  (.a({c22, c21, c12, c11}), .y(cpass));

  // Switch: gate each candidate with its case term and take the maximum.
  trit_t [4:0] g;

  tand #(.N(2)) u_g0 (.a({cpass, x}),   .y(g[0]));
  tand #(.N(2)) u_g1 (.a({c11,   p11}), .y(g[1]));
  tand #(.N(2)) u_g2 (.a({c12,   n12}), .y(g[2]));
  tand #(.N(2)) u_g3 (.a({c21,   n21}), .y(g[3]));
  tand #(.N(2)) u_g4 (.a({c22,   q22}), .y(g[4]));
  tor  #(.N(5)) u_sw (.a(g), .y(sum));

endmodule
