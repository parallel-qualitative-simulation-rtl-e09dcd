// tb_sf2_infvalue_check: exhaustive test of SF2 (infinite and zero magnitude
// check). All magnitudes zero, +/-landmark, +/-interval and +/-infinity for x,
// y and z are applied and compared with the reference model, plus hand-worked
// cases for 0 * inf and finite * finite.
module tb_sf2_infvalue_check;
  import qsim_pkg::*;
  import qsim_ref_pkg::*;

  qmag_t m1, m2, m3;
  logic  ok;
  int    checks = 0, failures = 0;
  qmag_t vals [7];

  sf2_infvalue_check dut (.m1, .m2, .m3, .ok);

  task automatic expect_ok(bit e);
    #1;
    checks++;
    if (ok !== e) begin
      failures++;
      $display("SF2 mismatch x=%b y=%b z=%b ok=%b exp=%b", m1, m2, m3, ok, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vals[0] = '{1'b0, 7'sd0};
    vals[1] = '{1'b0, 7'sd2};
    vals[2] = '{1'b0, -7'sd2};
    vals[3] = '{1'b0, 7'sd3};
    vals[4] = '{1'b0, -7'sd5};
    vals[5] = '{1'b1, 7'sd8};
    vals[6] = '{1'b1, -7'sd8};
    foreach (vals[i]) foreach (vals[j]) foreach (vals[k]) begin
      m1 = vals[i]; m2 = vals[j]; m3 = vals[k];
      expect_ok(ref_sf2(m1, m2, m3));
    end
    m1 = vals[0]; m2 = vals[5]; m3 = vals[0]; expect_ok(0);  // 0 * inf
    m1 = vals[5]; m2 = vals[0]; m3 = vals[5]; expect_ok(0);  // inf * 0
    m1 = vals[1]; m2 = vals[3]; m3 = vals[5]; expect_ok(0);  // finite*finite=inf
    m1 = vals[6]; m2 = vals[2]; m3 = vals[5]; expect_ok(1);  // -inf * - = inf
    m1 = vals[6]; m2 = vals[2]; m3 = vals[1]; expect_ok(0);  // must be infinite
    m1 = vals[1]; m2 = vals[4]; m3 = vals[2]; expect_ok(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
