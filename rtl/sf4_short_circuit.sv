// sf4_short_circuit: subfunction SF4 of the MULT-CCF, the AND of the partial
// results with short-circuit evaluation, and the sequencer of the SF3
// iterations.
//
// SF1, SF2 and SF3 are independent, so in the first cycle of an execution the
// partial results of SF1, SF2 and of the first SF3 iteration(s) are all valid
// together. SF3 is evaluated by LANES units side by side on consecutive
// tuples from the memory's circular read pointer: LANES = 1 is the
// sequential-SF3 organisation of the measured prototype, larger values give
// the array-processing variant. Each cycle examines up to LANES further
// tuples and steps the pointer with `step`. The first negative partial result
// ends the execution at once with result 0 and leaves the pointer on the
// failing tuple; when all `count` tuples have passed, the result is 1 and the
// pointer is back where it started.
//
// Timing: `start` is taken while idle. `busy` is then high for
// max(1, ceil(k / LANES)) cycles, k being the number of tuples examined, and
// `done` pulses for one cycle right after, with `result`, `cause` and `iters`
// (k) held until the next start. If several subfunctions fail in one cycle,
// the one reported follows the software order SF1, SF2, then SF3 in list
// order. Short-circuit evaluation and parallel SF3 iterations follow the
// document; the cycle-level schedule and the reporting are this design's.
module sf4_short_circuit
  import qsim_pkg::*;
#(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned LANES = 1,
  localparam int unsigned CW   = $clog2(DEPTH + 1),
  localparam int unsigned LW   = $clog2(LANES + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             sf1_ok,
  input  logic             sf2_ok,
  input  logic [LANES-1:0] sf3_ok,
  input  logic [CW-1:0]    count,
  output logic [LW-1:0]    step,
  output logic             busy,
  output logic             done,
  output logic             result,
  output term_t            cause,
  output logic [CW-1:0]    iters
);
  logic [CW-1:0] iter_q;
  logic [CW-1:0] remaining, active;
  logic          first, fail_found;
  logic [LW-1:0] fail_lane;
  logic          finish, fin_result;
  term_t         fin_cause;
  logic [CW-1:0] fin_iters;

  assign first     = (iter_q == '0);
  assign remaining = count - iter_q;
  assign active    = (remaining > CW'(LANES)) ? CW'(LANES) : remaining;

  // first failing lane among the active ones
  always_comb begin
    fail_found = 1'b0;
    fail_lane  = '0;
    for (int j = 0; j < LANES; j++) begin
      if (!fail_found && CW'(j) < active && !sf3_ok[j]) begin
        fail_found = 1'b1;
        fail_lane  = LW'(j);
      end
    end
  end

  always_comb begin
    step       = '0;
    finish     = 1'b0;
    fin_result = 1'b0;
    fin_cause  = TERM_NONE;
    fin_iters  = '0;
    if (busy) begin
      if (first && !sf1_ok) begin
        finish    = 1'b1;
        fin_cause = TERM_SF1;
      end else if (first && !sf2_ok) begin
        finish    = 1'b1;
        fin_cause = TERM_SF2;
      end else if (count == '0) begin
        finish     = 1'b1;
        fin_result = 1'b1;
      end else if (fail_found) begin
        step      = fail_lane;
        finish    = 1'b1;
        fin_cause = TERM_SF3;
        fin_iters = iter_q + CW'(fail_lane) + 1'b1;
      end else begin
        step = LW'(active);
        if (active == remaining) begin
          finish     = 1'b1;
          fin_result = 1'b1;
          fin_iters  = count;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      iter_q <= '0;
      result <= 1'b0;
      cause  <= TERM_NONE;
      iters  <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy   <= 1'b1;
          iter_q <= '0;
        end
      end else if (finish) begin
        busy   <= 1'b0;
        done   <= 1'b1;
        result <= fin_result;
        cause  <= fin_cause;
        iters  <= fin_iters;
      end else begin
        iter_q <= iter_q + active;
      end
    end
  end

  // The tuple count must not change under a running execution.
  a_count_stable: assert property (@(posedge clk) disable iff (!rst_n)
    busy && !finish |=> $stable(count));
endmodule
