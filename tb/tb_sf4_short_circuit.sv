// tb_sf4_short_circuit: test of the SF4 short-circuit AND and SF3 sequencer,
// with three SF3 lanes. The partial results are driven by a scripted model:
// SF1 and SF2 pass or fail, and SF3 fails on a chosen tuple (or never); the
// model follows the pointer steps the sequencer issues. For each scenario the
// result, the reported cause, the number of tuples examined, the total
// pointer movement and the latency from start to done
// (max(1, ceil(k / LANES)) cycles for k tuples examined) are checked.
module tb_sf4_short_circuit;
  import qsim_pkg::*;

  localparam int DEPTH = 8;
  localparam int LANES = 3;
  localparam int LW    = $clog2(LANES + 1);
  localparam int CW    = $clog2(DEPTH + 1);

  logic          clk = 0, rst_n = 0, start = 0;
  logic          sf1_ok, sf2_ok;
  logic [LANES-1:0] sf3_ok;
  logic [LW-1:0] step;
  logic [CW-1:0] count;
  logic          busy, done, result;
  term_t         cause;
  logic [CW-1:0] iters;
  int            checks = 0, failures = 0;
  int            fail_at;     // SF3 fails on this iteration (1-based), 0 never
  int            it;          // iteration the model is on

  sf4_short_circuit #(.DEPTH(DEPTH), .LANES(LANES)) dut (.*);

  always #5 clk = ~clk;

  // SF3 model: lane j looks at tuple it+j (0-based), which fails when
  // it+j+1 == fail_at.
  always_comb
    for (int j = 0; j < LANES; j++) sf3_ok[j] = !(fail_at != 0 && it + j + 1 == fail_at);
  always @(posedge clk) it <= it + int'(step);

  task automatic check(string what, bit cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run(bit p1, bit p2, int n, int f);
    int cyc = 0, adv = 0;
    bit exp_res;
    term_t exp_cause;
    int exp_iters, exp_cyc;
    sf1_ok = p1; sf2_ok = p2; count = CW'(n); fail_at = f; it = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (!done) begin
      cyc++;
      adv += int'(step);
      @(negedge clk);
      if (cyc > 100) break;
    end
    if (!p1)                    begin exp_res = 0; exp_cause = TERM_SF1; exp_iters = 0; exp_cyc = 1; end
    else if (!p2)               begin exp_res = 0; exp_cause = TERM_SF2; exp_iters = 0; exp_cyc = 1; end
    else if (n == 0)            begin exp_res = 1; exp_cause = TERM_NONE; exp_iters = 0; exp_cyc = 1; end
    else if (f != 0 && f <= n)  begin exp_res = 0; exp_cause = TERM_SF3; exp_iters = f; exp_cyc = (f + LANES - 1) / LANES; end
    else                        begin exp_res = 1; exp_cause = TERM_NONE; exp_iters = n; exp_cyc = (n + LANES - 1) / LANES; end
    check($sformatf("result %0d%0d n=%0d f=%0d", p1, p2, n, f), result == exp_res);
    check($sformatf("cause %0d%0d n=%0d f=%0d: %0d", p1, p2, n, f, cause), cause == exp_cause);
    check($sformatf("iters n=%0d f=%0d: %0d", n, f, iters), int'(iters) == exp_iters);
    check($sformatf("latency n=%0d f=%0d: %0d", n, f, cyc), cyc == exp_cyc);
    check($sformatf("advances n=%0d f=%0d: %0d", n, f, adv),
          adv == ((exp_cause == TERM_NONE) ? exp_iters : (exp_cause == TERM_SF3 ? exp_iters - 1 : 0)));
    @(negedge clk);
    check("idle after done", !busy);
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sf1_ok = 1; sf2_ok = 1; count = '0; fail_at = 0; it = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(0, 1, 4, 0);
    run(0, 0, 4, 1);
    run(1, 0, 4, 1);
    run(1, 1, 0, 0);
    for (int n = 1; n <= DEPTH; n++)
      for (int f = 0; f <= n; f++) run(1, 1, n, f);
    // start is ignored while busy (8 tuples: 3 cycles)
    sf1_ok = 1; sf2_ok = 1; count = CW'(8); fail_at = 0; it = 0;
    @(negedge clk) start = 1;
    @(negedge clk);
    @(negedge clk) start = 0;
    repeat (4) @(negedge clk);
    check("second start ignored while busy", !busy && it == 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
