// sf2_infvalue_check: subfunction SF2 of the MULT-CCF, the infinite-value
// check.
//
// For x * y = z it tests how infinite and zero magnitudes relate:
//   - 0 * inf is undefined, so a tuple with x = 0 and y infinite (or the
//     reverse) is rejected;
//   - otherwise z must be infinite exactly when x or y is infinite.
// The document says only that SF2 tests relations between infinite and zero
// values and uses the magnitudes alone; these two rules are this design's
// reading of that. Only the inf flag of z is needed here: the sign of z is
// SF1's business. Purely combinational.
module sf2_infvalue_check
  import qsim_pkg::*;
(
  input  qmag_t m1,   // x
  input  qmag_t m2,   // y
  input  qmag_t m3,   // z
  output logic  ok
);
  logic zero1, zero2, undefined_product;

  always_comb begin
    zero1             = (m1.pos == '0);
    zero2             = (m2.pos == '0);
    undefined_product = (m1.inf && zero2) || (m2.inf && zero1);
    ok                = !undefined_product && (m3.inf == (m1.inf || m2.inf));
  end
endmodule
