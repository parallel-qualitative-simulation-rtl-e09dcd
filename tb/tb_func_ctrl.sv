// tb_func_ctrl: test of the instruction decoder and sequencer. The testbench
// plays both the I/O controller (instruction words in, result words out with
// random back-pressure) and the evaluation unit (it answers each start with a
// done pulse after a random delay and random outcome). It checks the memory
// strobes and tuple for CLEAR and APPEND, that NOP does nothing, that EXEC
// latches the three qvals and starts exactly once, that no instruction is
// taken while an execution is pending, and the layout of every result word.
module tb_func_ctrl;
  import qsim_pkg::*;
  import qsim_ref_pkg::*;

  localparam int DEPTH = 16;
  localparam int CW    = $clog2(DEPTH + 1);

  logic              clk = 0, rst_n = 0;
  logic              cmd_valid = 0, cmd_ready, res_valid, res_ready = 0;
  logic [WORD_W-1:0] cmd_data = '0, res_data;
  logic              mem_clr, mem_wr, mem_full = 0;
  cval_tuple_t       mem_wdata;
  logic [CW-1:0]     mem_count = '0;
  logic              start, done = 0, result = 0;
  qval_t             q1, q2, q3;
  term_t             cause = TERM_NONE;
  logic [CW-1:0]     iters = '0;
  int                checks = 0, failures = 0;
  int                n_clr = 0, n_wr = 0, n_start = 0, n_stall = 0;

  func_ctrl #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, bit cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) begin
    if (mem_clr) n_clr++;
    if (mem_wr) n_wr++;
    if (start) n_start++;
    if (cmd_valid && !cmd_ready) n_stall++;
  end

  // Send one word; returns after the clock edge that takes it.
  task automatic send(logic [31:0] w, output bit clr_seen, output bit wr_seen,
                      output bit start_seen, output cval_tuple_t wd);
    cmd_valid = 1; cmd_data = w;
    forever begin
      @(posedge clk);
      if (cmd_ready) break;
    end
    clr_seen = mem_clr; wr_seen = mem_wr; start_seen = start; wd = mem_wdata;
    @(negedge clk);
    cmd_valid = 0;
  endtask

  initial begin
    #300000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit c, w, s;
    cval_tuple_t wd, t;
    qval_t a, b, z;
    logic [31:0] word;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 200; i++) begin
      case ($urandom_range(0, 3))
        0: begin
          send(w_clear(), c, w, s, wd);
          check("CLEAR strobes", c && !w && !s);
        end
        1: begin
          t = rand_tuple();
          send(w_append(t), c, w, s, wd);
          check("APPEND strobes", !c && w && !s);
          check("APPEND tuple", wd == t);
        end
        2: begin
          send({2'b00, 30'h155}, c, w, s, wd);
          check("NOP strobes", !c && !w && !s);
        end
        default: begin
          bit r; term_t k; int it, cnt, del; bit fl;
          a = rand_qval(1); b = rand_qval(1); z = rand_qval(1);
          r = 1'($urandom_range(0, 1)); k = term_t'($urandom_range(0, 3));
          it = $urandom_range(0, DEPTH); cnt = $urandom_range(0, DEPTH);
          fl = 1'($urandom_range(0, 1)); del = $urandom_range(0, 5);
          send(w_exec(a, b, z), c, w, s, wd);
          check("EXEC strobes", !c && !w && s);
          check("EXEC operands", q1 == a && q2 == b && q3 == z);
          // behave as SF4: a busy period, then done
          cmd_valid = 1; cmd_data = w_clear();    // must not be taken meanwhile
          repeat (del) @(negedge clk);
          result = r; cause = k; iters = CW'(it); mem_count = CW'(cnt); mem_full = fl;
          done = 1;
          @(negedge clk) done = 0;
          repeat ($urandom_range(0, 3)) @(negedge clk);   // host slow to take it
          check("result pending", res_valid && !cmd_ready);
          res_ready = 1;
          @(posedge clk);
          word = res_data;
          @(negedge clk) res_ready = 0;
          cmd_valid = 0;
          check($sformatf("result word %h", word),
                word == {7'd0, fl, 8'(cnt), 8'(it), 5'd0, k, r});
          @(negedge clk);
          check("back to idle", cmd_ready && !res_valid);
        end
      endcase
    end
    check("each instruction kind seen", n_clr > 0 && n_wr > 0 && n_start > 0 && n_stall > 0);
    $display("clear=%0d append=%0d exec=%0d stalled cycles=%0d", n_clr, n_wr, n_start, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
