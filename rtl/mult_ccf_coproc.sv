// mult_ccf_coproc: coprocessor for the MULT constraint check function (CCF)
// of the qualitative simulator QSIM, the top of this design.
//
// A host processor sends instruction words on the input channel and receives
// result words on the output channel (see func_ctrl for the formats). The
// coprocessor checks whether a tuple of qualitative values (x, y, z) is
// consistent with the constraint x * y = z. The check is split into four
// subfunctions: SF1 tests signs and directions of change, SF2 tests infinite
// and zero magnitudes, SF3 tests the magnitudes against each stored tuple of
// corresponding values, and SF4 ANDs the partial results, stopping at the
// first negative one. SF1, SF2 and the first SF3 iteration run in the same
// cycle; further SF3 iterations take one cycle each. The corresponding-value
// tuples live in an internal three-bank memory, read one whole tuple per
// cycle through a circular auto-incrementing pointer and loaded by CLEAR and
// APPEND instructions.
//
// LANES > 1 instantiates that many SF3 units, which check consecutive tuples
// in the same cycle (the array-processing variant); the default, 1, is the
// sequential organisation of the measured prototype.
//
// Timing: an EXEC word taken from the input buffer occupies SF4 for
// max(1, ceil(k / LANES)) cycles, k being the number of tuples examined. The
// result word is queued two cycles later and offered to the host one cycle
// after that, so on an idle coprocessor with LANES = 1 it appears k + 3
// cycles after the host's instruction word is taken. Input buffering goes on
// meanwhile. The block structure (SF1..SF4, three-bank memory, I/O and
// function controllers) follows the document; widths, encodings, the channel
// protocol and the depths are this design's choices.
module mult_ccf_coproc
  import qsim_pkg::*;
#(
  parameter int unsigned DEPTH          = 16,
  parameter int unsigned IN_FIFO_DEPTH  = 2,
  parameter int unsigned OUT_FIFO_DEPTH = 2,
  parameter int unsigned LANES          = 1,
  localparam int unsigned CW            = $clog2(DEPTH + 1),
  localparam int unsigned LW            = $clog2(LANES + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [WORD_W-1:0] in_data,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [WORD_W-1:0] out_data
);
  logic              cmd_valid, cmd_ready, res_valid, res_ready;
  logic [WORD_W-1:0] cmd_data, res_data;
  logic              mem_clr, mem_wr, mem_full;
  logic [LW-1:0]     step;
  cval_tuple_t       mem_wdata;
  cval_tuple_t       cval [LANES];
  logic [CW-1:0]     mem_count, iters;
  logic              start, done, result;
  term_t             cause;
  qval_t             q1, q2, q3;
  logic              sf1_ok, sf2_ok;
  logic [LANES-1:0]  sf3_ok;

  io_ctrl #(.IN_DEPTH(IN_FIFO_DEPTH), .OUT_DEPTH(OUT_FIFO_DEPTH)) u_io (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data,
    .out_valid, .out_ready, .out_data,
    .cmd_valid, .cmd_ready, .cmd_data,
    .res_valid, .res_ready, .res_data
  );

  func_ctrl #(.DEPTH(DEPTH)) u_fc (
    .clk, .rst_n,
    .cmd_valid, .cmd_ready, .cmd_data,
    .res_valid, .res_ready, .res_data,
    .mem_clr, .mem_wr, .mem_wdata, .mem_count, .mem_full,
    .start, .q1, .q2, .q3,
    .done, .result, .cause, .iters
  );

  cval_mem #(.DEPTH(DEPTH), .LANES(LANES)) u_mem (
    .clk, .rst_n,
    .clr(mem_clr), .wr(mem_wr), .wdata(mem_wdata),
    .step, .rdata(cval), .count(mem_count), .full(mem_full)
  );

  sf1_value_check    u_sf1 (.q1(q1), .q2(q2), .q3(q3), .ok(sf1_ok));
  sf2_infvalue_check u_sf2 (.m1(q1.mag), .m2(q2.mag), .m3(q3.mag), .ok(sf2_ok));

  for (genvar j = 0; j < LANES; j++) begin : g_sf3
    sf3_cval_check u_sf3 (.m1(q1.mag), .m2(q2.mag), .m3(q3.mag), .cv(cval[j]), .ok(sf3_ok[j]));
  end

  sf4_short_circuit #(.DEPTH(DEPTH), .LANES(LANES)) u_sf4 (
    .clk, .rst_n,
    .start, .sf1_ok, .sf2_ok, .sf3_ok, .count(mem_count),
    .step, .busy(), .done, .result, .cause, .iters
  );
endmodule
