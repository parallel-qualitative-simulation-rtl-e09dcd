// tb_sf3_cval_check: test of one SF3 iteration (check against one tuple of
// corresponding values). Hand-worked cases first, then 20000 random
// magnitude/tuple pairs compared with the integer reference model.
module tb_sf3_cval_check;
  import qsim_pkg::*;
  import qsim_ref_pkg::*;

  qmag_t       m1, m2, m3;
  cval_tuple_t cv;
  logic        ok;
  int          checks = 0, failures = 0, rejects = 0;

  sf3_cval_check dut (.m1, .m2, .m3, .cv, .ok);

  function automatic qmag_t mk(int p, bit i = 0);
    return '{inf: i, pos: POS_W'(p)};
  endfunction

  task automatic expect_ok(bit e);
    #1;
    checks++;
    if (ok !== e) begin
      failures++;
      $display("SF3 mismatch x=%0d y=%0d z=%0d cv=(%0d,%0d,%0d) ok=%b exp=%b",
               m1.pos, m2.pos, m3.pos, cv.c1.pos, cv.c2.pos, cv.c3.pos, ok, e);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cv = '{mk(2), mk(4), mk(2)};
    m1 = mk(2); m2 = mk(4); m3 = mk(2); expect_ok(1);  // equal, equal -> equal
    m3 = mk(3);                         expect_ok(0);  // ... z above c
    m1 = mk(3); m2 = mk(5); m3 = mk(1); expect_ok(0);  // above, above -> not below
    m3 = mk(5);                         expect_ok(1);
    m1 = mk(1); m2 = mk(5); m3 = mk(1); expect_ok(1);  // mixed: anything
    m1 = mk(-3);                        expect_ok(1);  // other side: no restriction
    cv = '{mk(2), mk(0), mk(2)};
    m1 = mk(3); m2 = mk(1); m3 = mk(1); expect_ok(1);  // zero landmark: no restriction
    cv = '{mk(-2), mk(-4), mk(2)};
    m1 = mk(-3); m2 = mk(-5); m3 = mk(1); expect_ok(0); // negative side, magnitudes
    m1 = mk(-3); m2 = mk(-5); m3 = mk(4, 1); expect_ok(1); // z infinite is larger
    repeat (20000) begin
      m1 = rand_qmag(1); m2 = rand_qmag(1); m3 = rand_qmag(1);
      cv = rand_tuple();
      #1;
      if (!ok) rejects++;
      expect_ok(ref_sf3(m1, m2, m3, cv));
    end
    if (rejects == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
