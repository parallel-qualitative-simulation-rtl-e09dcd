// tb_mult_ccf_coproc: end-to-end test of the MULT-CCF coprocessor at its
// default parameters, driven only through the two host channels.
//
// The instruction-level reference model (ccf_model, with its own copy of the
// tuple list and of the circular read pointer) predicts every result word. Phases:
//   1. Latency: the six termination cases used to measure the coprocessor
//      (SF1; SF2; SF3 after 1, 2, 3, 4 iterations) run one at a time on an
//      idle coprocessor, checking the result and the time from instruction
//      in to result out, k + 3 cycles for k tuples examined (at least 1).
//   2. Constraint-filter workload M1: 30 MULT constraints, each with its own
//      corresponding-value list, and 64 tuple checks per constraint (1920
//      executions), streamed with random gaps and host back-pressure.
//   3. Overflow: more tuples than the memory holds, then checks against it.
// Each mechanism (every termination cause, the empty-list pass, pointer
// wrap-around, dropped append on a full list, input taken while output is
// blocked, input stalled) is counted and must occur at least once.
module tb_mult_ccf_coproc;
  import qsim_pkg::*;
  import qsim_ref_pkg::*;

  localparam int DEPTH = 16;        // default of the coprocessor
  localparam int M1_CONSTRAINTS = 30;
  localparam int M1_TUPLES      = 64;

  logic              clk = 0, rst_n = 0;
  logic              in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [WORD_W-1:0] in_data = '0, out_data;

  int checks = 0, failures = 0;
  int n_inwhileblocked = 0, n_install = 0;
  logic [31:0] expq [$];
  bit          random_ready = 0;
  ccf_model    mdl = new(DEPTH);

  mult_ccf_coproc dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, bit cond);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // ---- host side: send one word (holds valid until taken)
  task automatic send(logic [31:0] w);
    logic [32:0] res;
    in_valid = 1; in_data = w;
    forever begin
      @(posedge clk);
      if (!in_ready) n_install++;
      if (in_ready && out_valid && !out_ready) n_inwhileblocked++;
      if (in_ready) break;
    end
    @(negedge clk);
    in_valid = 0;
    res = mdl.apply(w);
    if (res[32]) expq.push_back(res[31:0]);
  endtask

  // ---- result monitor
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      if (expq.size() == 0) check("unexpected result word", 0);
      else begin
        logic [31:0] e;
        e = expq.pop_front();
        check($sformatf("result %h expected %h", out_data, e), out_data == e);
      end
    end
  end
  always @(negedge clk) out_ready <= random_ready ? ($urandom_range(0, 9) < 6) : 1'b1;

  // ---- stimulus helpers
  function automatic qmag_t mk(int p, bit i = 0);
    return '{inf: i, pos: POS_W'(p)};
  endfunction

  task automatic wait_drain();
    int guard = 0;
    while ((expq.size() != 0 || out_valid) && guard < 1000) begin
      @(negedge clk);
      guard++;
    end
  endtask

  // Phase 1 helper: one execution on an idle coprocessor, latency measured.
  task automatic timed_exec(logic [31:0] w, int exp_case, int k);
    int lat = 0;
    logic [31:0] res;
    wait_drain();
    in_valid = 1; in_data = w;
    @(posedge clk);
    @(negedge clk);
    in_valid = 0;
    res = mdl.apply(w)[31:0];
    expq.push_back(res);
    while (!(out_valid && out_ready)) begin
      lat++;
      @(posedge clk);
      #1;
      if (lat > 200) break;
    end
    // lat counts clock edges from the one taking the word to the one after
    // which the result word is offered on the output channel
    check($sformatf("case %0d latency %0d, expected %0d", exp_case, lat, k + 3),
          lat == k + 3);
    @(negedge clk);
    check($sformatf("case %0d cause", exp_case),
          (exp_case <= 2) ? res[2:1] == 2'(exp_case) : (res[2:1] == 2'd3 && int'(res[15:8]) == exp_case - 2));
  endtask

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // ---- phase 1: termination cases 1..6 with latency
    begin
      qval_t x, y, z, zbad, zinf;
      x = '{mk(3), 2'b01}; y = '{mk(3), 2'b01}; z = '{mk(5), 2'b01};
      zbad = '{mk(-5), 2'b01}; zinf = '{mk(8, 1), 2'b01};
      timed_exec(w_exec(x, y, zbad), 1, 1);           // SF1: sign wrong
      timed_exec(w_exec(x, y, zinf), 2, 1);           // SF2: finite*finite=inf
      for (int f = 1; f <= 4; f++) begin
        send(w_clear());
        for (int i = 1; i <= 6; i++)                  // tuple f has c3 above z
          send(w_append('{mk(2), mk(2), (i == f) ? mk(6) : mk(2)}));
        timed_exec(w_exec(x, y, z), f + 2, f);
      end
      // all six pass, pointer returns to where it started
      send(w_clear());
      for (int i = 1; i <= 6; i++) send(w_append('{mk(2), mk(2), mk(2)}));
      timed_exec(w_exec(x, y, z), 0, 6);
    end

    // ---- phase 2: workload M1, streamed with back-pressure
    random_ready = 1;
    for (int c = 0; c < M1_CONSTRAINTS; c++) begin
      int nt;
      nt = (c == 0) ? 0 : $urandom_range(0, 8);
      send(w_clear());
      for (int i = 0; i < nt; i++) send(w_append(near_tuple()));
      for (int i = 0; i < M1_TUPLES; i++) begin
        if ($urandom_range(0, 3) == 0) @(negedge clk);
        send(rand_exec());
      end
    end

    // ---- phase 3: overflow of the tuple memory
    send(w_clear());
    for (int i = 0; i < DEPTH + 3; i++) send(w_append(near_tuple()));
    for (int i = 0; i < 40; i++) send(rand_exec());
    send({2'b00, 30'h0});                              // ignored word
    random_ready = 0;
    wait_drain();
    check("all results delivered", expq.size() == 0);

    $display("executions=%0d  SF1=%0d SF2=%0d SF3=%0d pass=%0d", mdl.n_exec,
             mdl.n_term[1], mdl.n_term[2], mdl.n_term[3], mdl.n_term[0]);
    $display("cases 1..6: %0d %0d %0d %0d %0d %0d", mdl.n_case[1], mdl.n_case[2], mdl.n_case[3],
             mdl.n_case[4], mdl.n_case[5], mdl.n_case[6]);
    $display("empty-list=%0d wraps=%0d dropped-appends=%0d clears=%0d in-while-out-blocked=%0d in-stalls=%0d",
             mdl.n_empty, mdl.n_wrap, mdl.n_drop, mdl.n_clear, n_inwhileblocked, n_install);
    check("every termination cause", mdl.n_term[0] > 0 && mdl.n_term[1] > 0 && mdl.n_term[2] > 0 && mdl.n_term[3] > 0);
    for (int i = 1; i <= 6; i++) check($sformatf("case %0d seen", i), mdl.n_case[i] > 0);
    check("empty-list pass", mdl.n_empty > 0);
    check("pointer wrap", mdl.n_wrap > 0);
    check("dropped append", mdl.n_drop > 0);
    check("input while output blocked", n_inwhileblocked > 0);
    check("input stalled", n_install > 0);
    check("M1 size", mdl.n_exec >= M1_CONSTRAINTS * M1_TUPLES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
