// sf1_value_check: subfunction SF1 of the MULT-CCF, the value check.
//
// For the constraint x * y = z it tests the signs of the magnitudes and the
// directions of change of the three qualitative values:
//   sign(z) must equal sign(x) * sign(y), and
//   qdir(z) must lie in the qualitative sum sign(x)*qdir(y) (+) sign(y)*qdir(x)
//   (the product rule d(xy) = x dy + y dx; terms of opposite sign allow any
//   direction).
// The nested case analysis of a software check is replaced by small tables on
// the 2-bit sign codes, as the document suggests. That SF1 checks signs and
// directions and feeds SF4 follows the document; the exact rules are the
// standard QSIM multiplication rules, chosen by this design.
// Purely combinational; ok is valid in the same cycle as the inputs.
module sf1_value_check
  import qsim_pkg::*;
(
  input  qval_t q1,   // x
  input  qval_t q2,   // y
  input  qval_t q3,   // z
  output logic  ok
);
  sgn_t    s1, s2, s3;
  sgnset_t dirset;
  logic    sign_ok, dir_ok;

  always_comb begin
    s1      = sign_of(q1.mag.pos);
    s2      = sign_of(q2.mag.pos);
    s3      = sign_of(q3.mag.pos);
    sign_ok = (s3 == sgn_mul(s1, s2));
    dirset  = sgn_add(sgn_mul(s1, q2.dir), sgn_mul(s2, q1.dir));
    dir_ok  = |(dirset & sgn_bit(q3.dir));
    ok      = sign_ok && dir_ok;
  end
endmodule
