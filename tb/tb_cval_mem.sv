// tb_cval_mem: test of the three-bank corresponding-value memory. It appends
// tuples and checks that every bank returns its part of the tuple at the read
// pointer and at the following positions (three read lanes), that `step`
// moves the pointer and wraps it after the last stored tuple (circular
// addressing), that appends to a full list are dropped, that clear empties
// the list, and that clear wins over a simultaneous append.
module tb_cval_mem;
  import qsim_pkg::*;
  import qsim_ref_pkg::*;

  localparam int DEPTH = 6;
  localparam int LANES = 3;
  localparam int LW    = $clog2(LANES + 1);
  localparam int CW    = $clog2(DEPTH + 1);

  logic          clk = 0, rst_n = 0, clr = 0, wr = 0;
  logic [LW-1:0] step = '0;
  cval_tuple_t   wdata;
  cval_tuple_t   rdata [LANES];
  logic [CW-1:0] count;
  logic          full;
  int            checks = 0, failures = 0, wraps = 0;
  cval_tuple_t   model [$];
  int            ptr;

  cval_mem #(.DEPTH(DEPTH), .LANES(LANES)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, bit cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic append(cval_tuple_t t);
    wdata = t; wr = 1;
    @(negedge clk) wr = 0;
    if (model.size() < DEPTH) model.push_back(t);
  endtask

  task automatic advance(int by);
    step = LW'(by);
    @(negedge clk) step = '0;
    for (int i = 0; i < by; i++) begin
      ptr = (ptr + 1 >= model.size()) ? 0 : ptr + 1;
      if (ptr == 0) wraps++;
    end
  endtask

  task automatic compare();
    check($sformatf("count %0d vs %0d", count, model.size()), int'(count) == model.size());
    check("full flag", full == (model.size() == DEPTH));
    if (model.size() > 0) begin
      int p;
      p = ptr;
      for (int j = 0; j < LANES; j++) begin
        check($sformatf("bank1 lane %0d at %0d", j, p), rdata[j].c1 == model[p].c1);
        check($sformatf("bank2 lane %0d at %0d", j, p), rdata[j].c2 == model[p].c2);
        check($sformatf("bank3 lane %0d at %0d", j, p), rdata[j].c3 == model[p].c3);
        p = (p + 1 >= model.size()) ? 0 : p + 1;
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wdata = '0; ptr = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    compare();
    for (int i = 0; i < 3; i++) begin append(rand_tuple()); compare(); end
    for (int i = 0; i < 7; i++) begin advance(1); compare(); end
    for (int i = 0; i < 5; i++) begin append(rand_tuple()); compare(); end  // last two dropped
    check("full reached", full);
    for (int i = 0; i < 13; i++) begin advance($urandom_range(0, LANES)); compare(); end
    // clear wins over a simultaneous append
    wdata = rand_tuple(); wr = 1; clr = 1;
    @(negedge clk) begin wr = 0; clr = 0; end
    model.delete(); ptr = 0;
    compare();
    append(rand_tuple()); compare();
    advance(1); compare();      // a one-tuple list wraps onto itself
    advance(3); compare();
    check("wrapped several times", wraps >= 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
