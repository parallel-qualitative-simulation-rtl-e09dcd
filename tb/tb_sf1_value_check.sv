// tb_sf1_value_check: exhaustive test of SF1 (sign and direction check of
// x * y = z). Every combination of positions -3..3 (zero, landmarks and
// intervals on both sides) and of the three directions for x, y and z is
// applied and the output compared with the integer reference model.
module tb_sf1_value_check;
  import qsim_pkg::*;
  import qsim_ref_pkg::*;

  qval_t q1, q2, q3;
  logic  ok;
  int    checks = 0, failures = 0, passes = 0;
  sgn_t  dirs [3] = '{2'b00, 2'b01, 2'b11};

  sf1_value_check dut (.q1, .q2, .q3, .ok);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = -3; a <= 3; a++)
      for (int b = -3; b <= 3; b++)
        for (int c = -3; c <= 3; c++)
          for (int da = 0; da < 3; da++)
            for (int db = 0; db < 3; db++)
              for (int dc = 0; dc < 3; dc++) begin
                q1 = '{mag: '{inf: 1'b0, pos: POS_W'(a)}, dir: dirs[da]};
                q2 = '{mag: '{inf: 1'b0, pos: POS_W'(b)}, dir: dirs[db]};
                q3 = '{mag: '{inf: 1'b0, pos: POS_W'(c)}, dir: dirs[dc]};
                #1;
                checks++;
                if (ok) passes++;
                if (ok !== ref_sf1(q1, q2, q3)) begin
                  failures++;
                  if (failures < 10)
                    $display("SF1 mismatch x=%0d/%b y=%0d/%b z=%0d/%b ok=%b",
                             a, dirs[da], b, dirs[db], c, dirs[dc], ok);
                end
              end
    // a few hand-worked cases
    q1 = '{'{1'b0, 7'sd1}, 2'b01}; q2 = '{'{1'b0, 7'sd2}, 2'b00}; q3 = '{'{1'b0, 7'sd3}, 2'b01};
    #1; checks++; if (ok !== 1'b1) failures++;   // (+,inc)*(+,std) = (+,inc)
    q3.dir = 2'b11;
    #1; checks++; if (ok !== 1'b0) failures++;   // ... cannot be decreasing
    q2.dir = 2'b11;
    #1; checks++; if (ok !== 1'b1) failures++;   // inc*dec: any direction
    q3.mag.pos = -7'sd1;
    #1; checks++; if (ok !== 1'b0) failures++;   // (+)*(+) cannot be negative
    if (passes == 0 || passes == checks) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
