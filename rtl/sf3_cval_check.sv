// sf3_cval_check: one iteration of subfunction SF3 of the MULT-CCF, the
// corresponding-value check.
//
// A tuple of corresponding values (a, b, c) is a set of landmarks known to
// satisfy a * b = c. If a, b and c are finite, nonzero and on the same side of
// zero as x, y and z, the order of |z| against |c| must be one the orders of
// |x| against |a| and of |y| against |b| allow:
//   ord(|z|,|c|) in ord(|x|,|a|) (+) ord(|y|,|b|)
// (both larger gives larger, both equal gives equal, mixed allows anything).
// Any other tuple says nothing about x, y, z and passes. Because a, b, c are
// landmarks, an interval is always strictly above or below them, so the
// order follows from comparing positions. The document gives the role of SF3
// and that it reads cval1[i], cval2[i], cval3[i]; the rule is this design's.
// An infinite x, y or z needs no special case: its position is beyond every
// finite landmark on its side. Purely combinational: the coprocessor applies it to one stored tuple per
// cycle.
module sf3_cval_check
  import qsim_pkg::*;
(
  input  qmag_t       m1,   // x
  input  qmag_t       m2,   // y
  input  qmag_t       m3,   // z
  input  cval_tuple_t cv,   // corresponding values (a, b, c)
  output logic        ok
);
  function automatic logic usable(qmag_t v, qmag_t c);
    return !c.inf && (c.pos != '0) && (sign_of(v.pos) == sign_of(c.pos));
  endfunction

  logic    applies;
  sgnset_t allowed;

  always_comb begin
    applies = usable(m1, cv.c1) && usable(m2, cv.c2) && usable(m3, cv.c3);
    allowed = sgn_add(mag_cmp(m1.pos, cv.c1.pos), mag_cmp(m2.pos, cv.c2.pos));
    ok      = !applies || |(allowed & sgn_bit(mag_cmp(m3.pos, cv.c3.pos)));
  end
endmodule
