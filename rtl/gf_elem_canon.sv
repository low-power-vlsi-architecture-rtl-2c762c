// Galois field element generator for GF(3^M), canonical sum-of-products form.
//
// The field is built from a monic primitive polynomial
//   p(x) = x^M + P[M-1] x^(M-1) + ... + P[1] x + P[0]
// with alpha a root, so alpha^M = -(P[M-1] alpha^(M-1) + ... + P[0]) mod 3.
// The M-trit input idx is an element number, idx[M-1] the most significant
// trit: number 0 is the zero element and number k >= 1 is alpha^(k-1), so
// the 3^M numbers cover 0, 1, alpha, ..., alpha^(3^M - 2). The output y is
// that element's vector form, y[i] the coefficient of alpha^i.
//
// The defaults are GF(3^2) with p(x) = x^2 + x + 2 (alpha^2 = 2 alpha + 1);
// the GF(3^4) generator sets M = 4 and P for p(x) = x^4 + x + 2
// (alpha^4 = 2 alpha + 1).
//
// Structure. Every input trit goes through a ternary decoder. Each number n
// has a minterm, the NAND of the M decoder lines that spell n. For each
// output trit the minterms of the numbers whose coefficient is 2 are
// collected by one wide NAND (giving their OR), and those whose coefficient
// is 1 by another; the first is inverted by an STI, the second is NANDed
// with the constant 1, and a final NAND of the two yields
//   y[i] = max(OR of 2-minterms, min(OR of 1-minterms, 1)).
// Which minterm feeds which collector is decided at elaboration from the
// element table, which the function elem() computes by repeated
// multiplication by alpha; unused collector inputs are tied to 2, which a
// NAND ignores. For M = 2 this is exactly the two canonical expressions
// Y1 = (X1Y0 + X1Y1 + X2Y0)*2 + (X0Y2 + X2Y1 + X2Y2)*1 and
// Y0 = (X1Y1 + X1Y2 + X2Y1)*2 + (X0Y1 + X1Y0 + X2Y2)*1.
// Purely combinational, no clock.
module gf_elem_canon
  import ternary_pkg::*;
#(
  parameter int unsigned  M = 2,
  parameter trit_t [M-1:0] P = {T1, T2}   // P[1] = 1, P[0] = 2: x^2 + x + 2
) (
  input  trit_t [M-1:0] idx,
  output trit_t [M-1:0] y
);

  localparam int unsigned NEL = 3 ** M;

  typedef trit_t [M-1:0] vec_t;

  // Element number k -> vector form (k = 0: zero, else alpha^(k-1)).
  function automatic vec_t elem(int unsigned k);
    vec_t        v;
    int unsigned top;
    v = '0;
    if (k == 0) return v;
    v[0] = T1;
    for (int unsigned e = 1; e < k; e++) begin
      top = int'(v[M-1]);
      for (int i = M - 1; i > 0; i--) v[i] = v[i-1];
      v[0] = T0;
      for (int unsigned i = 0; i < M; i++)
        v[i] = trit_t'((int'(v[i]) + top * ((3 - int'(P[i])) % 3)) % 3);
    end
    return v;
  endfunction

  // Trit j of number n.
  function automatic int unsigned digit(int unsigned n, int unsigned j);
    return (n / (3 ** j)) % 3;
  endfunction

  // Decoder lines of every input trit.
  trit_t [M-1:0][2:0] dl;

  for (genvar j = 0; j < M; j++) begin : g_dec
    tdecoder u_dec (.a(idx[j]), .x(dl[j]));
  end

  // Minterm NANDs: nm[n] is 0 when idx == n, else 2.
  trit_t [NEL-1:0] nm;

  for (genvar n = 0; n < NEL; n++) begin : g_min
    trit_t [M-1:0] lines;
    for (genvar j = 0; j < M; j++) begin : g_line
      assign lines[j] = dl[j][digit(n, j)];
    end
    tnand #(.N(M)) u_nand (.a(lines), .y(nm[n]));
  end

  // One output trit per coefficient.
  for (genvar i = 0; i < M; i++) begin : g_out
    trit_t [NEL-1:0] in2, in1;
    trit_t           or2, or1, inv2, and1;

    for (genvar n = 0; n < NEL; n++) begin : g_sel
      localparam vec_t E = elem(n);
      assign in2[n] = (E[i] == T2) ? nm[n] : T2;
      assign in1[n] = (E[i] == T1) ? nm[n] : T2;
    end

    tnand #(.N(NEL)) u_or2  (.a(in2), .y(or2));
    tnand #(.N(NEL)) u_or1  (.a(in1), .y(or1));
    sti              u_inv2 (.a(or2), .y(inv2));
    tnand #(.N(2))   u_and1 (.a({T1, or1}), .y(and1));
    tnand #(.N(2))   u_y    (.a({and1, inv2}), .y(y[i]));
  end

endmodule
