// Shared types and helpers for the ternary logic library.
//
// A trit (ternary digit, unbalanced: 0, 1, 2) is carried on a 2-bit binary
// bus, trit_t, holding its value as an unsigned number. In the analogue
// circuits this library describes, the three values are three voltage
// levels on one wire (0 V, half supply, full supply); the 2-bit binary code
// is this library's own choice, made so the logic can be simulated and
// synthesised with ordinary digital tools. The code 2'b11 is not a trit.
// Every gate reads it as 2 (t_sat), so that an illegal input can never
// produce an illegal output, and t_legal lets checkers flag it.
package ternary_pkg;

  typedef logic [1:0] trit_t;

  localparam trit_t T0 = 2'd0;
  localparam trit_t T1 = 2'd1;
  localparam trit_t T2 = 2'd2;

  // True for the three codes that are trits.
  function automatic logic t_legal(trit_t t);
    return t != 2'd3;
  endfunction

  // Reads the one non-trit code as the highest level.
  function automatic trit_t t_sat(trit_t t);
    return (t == 2'd3) ? T2 : t;
  endfunction

  // Ternary AND is the minimum, ternary OR the maximum.
  function automatic trit_t t_min(trit_t a, trit_t b);
    return (t_sat(a) < t_sat(b)) ? t_sat(a) : t_sat(b);
  endfunction

  function automatic trit_t t_max(trit_t a, trit_t b);
    return (t_sat(a) > t_sat(b)) ? t_sat(a) : t_sat(b);
  endfunction

endpackage
