// tb_ccf_array_variant: end-to-end test of the coprocessor built as the
// array-processing variant, with four SF3 units checking consecutive
// corresponding-value tuples in the same cycle.
//
// The result words must be identical to those of the sequential organisation
// (same instruction-level reference model, ccf_model), and only the time
// changes: on an idle coprocessor the result appears ceil(k / 4) + 3 cycles
// after the instruction is taken, k being the number of tuples examined
// (at least 1). Phase 1 measures that latency for every failing position
// 1..16 in a full list and for a full pass; phase 2 streams 2000 random
// instructions with host back-pressure and compares every result.
module tb_ccf_array_variant;
  import qsim_pkg::*;
  import qsim_ref_pkg::*;

  localparam int DEPTH = 16;
  localparam int LANES = 4;

  logic              clk = 0, rst_n = 0;
  logic              in_valid = 0, in_ready, out_valid, out_ready = 1;
  logic [WORD_W-1:0] in_data = '0, out_data;
  int                checks = 0, failures = 0, n_lat = 0;
  logic [31:0]       expq [$];
  bit                random_ready = 0;
  ccf_model          mdl = new(DEPTH);

  mult_ccf_coproc #(.DEPTH(DEPTH), .LANES(LANES)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, bit cond);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic send(logic [31:0] w);
    logic [32:0] res;
    in_valid = 1; in_data = w;
    forever begin
      @(posedge clk);
      if (in_ready) break;
    end
    @(negedge clk);
    in_valid = 0;
    res = mdl.apply(w);
    if (res[32]) expq.push_back(res[31:0]);
  endtask

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

  task automatic wait_drain();
    int guard = 0;
    while ((expq.size() != 0 || out_valid) && guard < 1000) begin
      @(negedge clk);
      guard++;
    end
  endtask

  task automatic timed_exec(logic [31:0] w);
    int lat = 0, exp_lat;
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
    exp_lat = (mdl.last_k + LANES - 1) / LANES + 3;
    check($sformatf("latency %0d for k=%0d, expected %0d", lat, mdl.last_k, exp_lat),
          lat == exp_lat);
    n_lat++;
    @(negedge clk);
  endtask

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    qval_t x, y, z;
    x = '{mkq(3), 2'b01}; y = '{mkq(3), 2'b01}; z = '{mkq(5), 2'b01};
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // phase 1: failing tuple at every position of a full list, then a full pass
    for (int f = 1; f <= DEPTH + 1; f++) begin
      send(w_clear());
      for (int i = 1; i <= DEPTH; i++)
        send(w_append('{mkq(2), mkq(2), (i == f) ? mkq(6) : mkq(2)}));
      timed_exec(w_exec(x, y, z));
    end
    timed_exec(w_exec(x, y, '{mkq(-5), 2'b01}));   // SF1 terminates
    // phase 2: random stream
    random_ready = 1;
    for (int i = 0; i < 2000; i++) begin
      case ($urandom_range(0, 19))
        0:       send(w_clear());
        1, 2, 3: send(w_append(near_tuple()));
        default: send(rand_exec());
      endcase
    end
    random_ready = 0;
    wait_drain();
    check("all results delivered", expq.size() == 0);
    check("SF3 terminations and passes seen", mdl.n_term[3] > 0 && mdl.n_term[0] > 0);
    check("pointer wrap seen", mdl.n_wrap > 0);
    $display("executions=%0d SF1=%0d SF2=%0d SF3=%0d pass=%0d wraps=%0d timed=%0d",
             mdl.n_exec, mdl.n_term[1], mdl.n_term[2], mdl.n_term[3], mdl.n_term[0],
             mdl.n_wrap, n_lat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
