// func_ctrl: function controller of the MULT-CCF coprocessor.
//
// It takes one instruction word at a time from the I/O controller, decodes
// it and drives the other blocks. There are three instructions, two that
// update the corresponding-value memory and one that runs the check:
//   bits 31:30 = 01  CLEAR   empty the tuple list
//   bits 31:30 = 10  APPEND  append tuple {c1,c2,c3} from bits 23:0
//   bits 31:30 = 11  EXEC    check qvals {q1,q2,q3} from bits 29:0
//   bits 31:30 = 00  ignored
// CLEAR and APPEND complete in the cycle they are accepted and send nothing
// back. EXEC latches the three qvals into operand registers and starts SF4 in
// the same cycle; when SF4 signals done, one result word is queued to the
// output channel:
//   bit 0 result, bits 2:1 terminating subfunction (0 none, 1 SF1, 2 SF2,
//   3 SF3), bits 15:8 SF3 iterations, bits 23:16 tuples stored,
//   bit 24 tuple memory full; the other bits are zero.
// No new instruction is accepted until the result word is queued, but the
// I/O controller keeps buffering input meanwhile. Three instructions, two of
// them memory updates, follow the document; the choice of CLEAR and APPEND,
// the encodings and the result word are this design's.
module func_ctrl
  import qsim_pkg::*;
#(
  parameter int unsigned DEPTH = 16,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // instruction stream
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  logic [WORD_W-1:0] cmd_data,
  // result stream
  output logic              res_valid,
  input  logic              res_ready,
  output logic [WORD_W-1:0] res_data,
  // corresponding-value memory
  output logic              mem_clr,
  output logic              mem_wr,
  output cval_tuple_t       mem_wdata,
  input  logic [CW-1:0]     mem_count,
  input  logic              mem_full,
  // MULT-CCF evaluation (SF1..SF4)
  output logic              start,
  output qval_t             q1,
  output qval_t             q2,
  output qval_t             q3,
  input  logic              done,
  input  logic              result,
  input  term_t             cause,
  input  logic [CW-1:0]     iters
);
  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_RESP} state_t;
  state_t  state;
  opcode_t op;

  assign op        = opcode_t'(cmd_data[31:30]);
  assign cmd_ready = (state == S_IDLE);
  assign mem_wdata = cval_tuple_t'(cmd_data[23:0]);
  assign mem_clr   = cmd_valid && cmd_ready && (op == OP_CLEAR);
  assign mem_wr    = cmd_valid && cmd_ready && (op == OP_APPEND);
  assign start     = cmd_valid && cmd_ready && (op == OP_EXEC);
  assign res_valid = (state == S_RESP);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      res_data <= '0;
      q1       <= '0;
      q2       <= '0;
      q3       <= '0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          {q1, q2, q3} <= cmd_data[3*QVAL_W-1:0];
          state        <= S_WAIT;
        end
        S_WAIT: if (done) begin
          res_data        <= '0;
          res_data[0]     <= result;
          res_data[2:1]   <= cause;
          res_data[15:8]  <= 8'(iters);
          res_data[23:16] <= 8'(mem_count);
          res_data[24]    <= mem_full;
          state           <= S_RESP;
        end
        S_RESP: if (res_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  a_res_hold: assert property (@(posedge clk) disable iff (!rst_n)
    res_valid && !res_ready |=> res_valid && $stable(res_data));
endmodule
