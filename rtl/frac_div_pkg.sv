// frac_div_pkg -- shared types and elaboration-time arithmetic of the
// multi-round fractional clock divider.
//
// The divider turns an input clock of F_CLK Hz into an output clock whose
// average frequency is F_OUT Hz, where K = F_CLK/F_OUT = N + A/B is not an
// integer. Every output period lasts either N ("short") or N+1 ("long") input
// cycles. Which one is chosen is decided by a stack of ROUNDS rounds, each of
// which groups M units of the round below:
//
//   round 0 : a short unit is one N-cycle period, a long unit one N+1 period
//   round i : a short unit holds C_iA short and C_iB = M - C_iA long units of
//             round i-1; a long unit holds C_iA - 1 short and C_iB + 1 long.
//
// A short unit of round i is shorter than M^i ideal output periods by the
// error E_iA >= 0 and a long unit is longer by -E_iB > 0; they always differ
// by exactly one input cycle. C_iA is the smallest integer for which the
// round-i short unit is not longer than ideal, i.e. the ceiling of the
// real-valued solution of C*E_(i-1)A + (M-C)*E_(i-1)B = 0. This rounding
// rule reproduces the published coefficient table for 40 MHz -> 220.805 kHz
// (865, 978, 236, 580 with M = 1024).
//
// All errors are kept as exact integers in units of 1/(F_CLK*F_OUT) seconds:
//   E_0A = F_CLK - N*F_OUT,   E_0B = E_0A - F_OUT   (one input cycle = F_OUT)
//   E_iA = M*E_(i-1)B + C_iA*F_OUT,   E_iB = E_iA - F_OUT
// so no real arithmetic is needed and |E| stays below F_OUT in every round.
//
// Inside one unit the two kinds of sub-unit are spread evenly: with
// major = the more numerous kind, minor = the other, y = major / minor and
// R = major % minor, the unit is minor groups of (y majors, 1 minor) followed
// by R majors. The functions below give y and the counts for either unit kind.
package frac_div_pkg;

  // Kind of a unit in any round: short (N-based, "A") or long (N+1-based, "B").
  typedef enum logic {
    UNIT_SHORT = 1'b0,
    UNIT_LONG  = 1'b1
  } unit_kind_e;

  // Integer part of the division ratio.
  function automatic int unsigned div_int(longint unsigned f_clk, longint unsigned f_out);
    return int'(f_clk / f_out);
  endfunction

  // Round-0 error of the short (N) period, in units of 1/(f_clk*f_out) s.
  function automatic longint err0_short(longint unsigned f_clk, longint unsigned f_out);
    return longint'(f_clk) - longint'(div_int(f_clk, f_out)) * longint'(f_out);
  endfunction

  // Error of the short unit of round `rnd` (rnd = 0 gives E_0A).
  function automatic longint err_short(longint unsigned f_clk, longint unsigned f_out,
                                       int unsigned m, int unsigned rnd);
    longint ea, eb, num, c;
    ea = err0_short(f_clk, f_out);
    eb = ea - longint'(f_out);
    for (int unsigned i = 1; i <= rnd; i++) begin
      num = longint'(m) * (-eb);                                  // >= 0
      c   = (num + longint'(f_out) - 1) / longint'(f_out);        // ceiling
      ea  = longint'(m) * eb + c * longint'(f_out);
      eb  = ea - longint'(f_out);
    end
    return ea;
  endfunction

  // C_iA: number of short sub-units in a short unit of round `rnd` (rnd >= 1).
  function automatic int unsigned coeff_short(longint unsigned f_clk, longint unsigned f_out,
                                              int unsigned m, int unsigned rnd);
    longint eb, num;
    eb  = err_short(f_clk, f_out, m, rnd - 1) - longint'(f_out);
    num = longint'(m) * (-eb);
    return int'((num + longint'(f_out) - 1) / longint'(f_out));
  endfunction

  // Number of short sub-units in a unit of the given kind.
  function automatic int unsigned n_short(int unsigned c_a, unit_kind_e kind);
    return (kind == UNIT_LONG) ? c_a - 1 : c_a;
  endfunction

  // Number of long sub-units in a unit of the given kind.
  function automatic int unsigned n_long(int unsigned m, int unsigned c_a, unit_kind_e kind);
    return (kind == UNIT_LONG) ? m - c_a + 1 : m - c_a;
  endfunction

  // Kind of the more numerous sub-unit (short wins a tie).
  function automatic unit_kind_e major_kind(int unsigned m, int unsigned c_a, unit_kind_e kind);
    return (n_long(m, c_a, kind) > n_short(c_a, kind)) ? UNIT_LONG : UNIT_SHORT;
  endfunction

  // Number of minor sub-units in a unit of the given kind.
  function automatic int unsigned n_minor(int unsigned m, int unsigned c_a, unit_kind_e kind);
    int unsigned s, l;
    s = n_short(c_a, kind);
    l = n_long(m, c_a, kind);
    return (l > s) ? s : l;
  endfunction

  // y = int(major / minor): majors placed before each minor. With no minor at
  // all the whole unit is majors and y is never reached.
  function automatic int unsigned run_len(int unsigned m, int unsigned c_a, unit_kind_e kind);
    int unsigned mn;
    mn = n_minor(m, c_a, kind);
    return (mn == 0) ? m : (m - mn) / mn;
  endfunction

endpackage
