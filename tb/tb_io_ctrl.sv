// tb_io_ctrl: test of the I/O controller's two channels. Random word streams
// are pushed into the input channel and the result channel with random
// valid/ready gaps on every side. Each stream must arrive complete and in
// order, and some cycles must move a word on the input and the output channel
// at the same time (simultaneous input and output).
module tb_io_ctrl;
  import qsim_pkg::*;

  localparam int N = 400;

  logic              clk = 0, rst_n = 0;
  logic              in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [WORD_W-1:0] in_data = '0, out_data;
  logic              cmd_valid, cmd_ready = 0, res_valid = 0, res_ready;
  logic [WORD_W-1:0] cmd_data, res_data = '0;
  int                checks = 0, failures = 0, both = 0;
  logic [WORD_W-1:0] in_words [N], res_words [N];
  int                in_sent = 0, cmd_got = 0, res_sent = 0, out_got = 0;

  io_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (in_words[i]) begin in_words[i] = $urandom; res_words[i] = $urandom; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (cmd_got < N || out_got < N) begin
      @(posedge clk);
      // sample transfers at the edge
      if (in_valid && in_ready) in_sent++;
      if (res_valid && res_ready) res_sent++;
      if (cmd_valid && cmd_ready) begin
        checks++;
        if (cmd_data !== in_words[cmd_got]) begin
          failures++;
          $display("cmd word %0d wrong", cmd_got);
        end
        cmd_got++;
      end
      if (out_valid && out_ready) begin
        checks++;
        if (out_data !== res_words[out_got]) begin
          failures++;
          $display("out word %0d wrong", out_got);
        end
        out_got++;
      end
      if ((in_valid && in_ready) && (out_valid && out_ready)) both++;
      @(negedge clk);
      // senders keep valid until the word is taken
      if (!in_valid && in_sent < N && $urandom_range(0, 3) != 0) in_valid = 1;
      if (in_valid && in_sent >= N) in_valid = 0;
      if (in_sent < N) in_data = in_words[in_sent];
      if (!res_valid && res_sent < N && $urandom_range(0, 3) != 0) res_valid = 1;
      if (res_valid && res_sent >= N) res_valid = 0;
      if (res_sent < N) res_data = res_words[res_sent];
      cmd_ready = ($urandom_range(0, 2) != 0);
      out_ready = ($urandom_range(0, 2) != 0);
    end
    checks++;
    if (both == 0) begin
      failures++;
      $display("no cycle with input and output together");
    end
    $display("simultaneous in/out transfers: %0d", both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
