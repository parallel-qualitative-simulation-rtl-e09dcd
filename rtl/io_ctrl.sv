// io_ctrl: I/O controller of the MULT-CCF coprocessor.
//
// The coprocessor talks to its host processor over two separate channels,
// one carrying instruction words in and one carrying result words out. Each
// channel is buffered by its own FIFO, so the host can send the next
// instructions while a result is still waiting to be taken, and a result can
// leave while input arrives: input and output proceed at the same time.
//
// Each channel is a 32-bit valid/ready handshake: a word moves on a clock edge
// where valid and ready are both high, and a sender holds valid and data
// steady until then. The assertions below check the host side of this rule.
// Two channels with simultaneous input and output follow the document; the
// handshake, word width and FIFO depths are this design's choices (the host
// in the document is a DSP with byte-wide communication ports, whose protocol
// the document does not give).
module io_ctrl
  import qsim_pkg::*;
#(
  parameter int unsigned IN_DEPTH  = 2,
  parameter int unsigned OUT_DEPTH = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  // host input channel
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [WORD_W-1:0] in_data,
  // host output channel
  output logic              out_valid,
  input  logic              out_ready,
  output logic [WORD_W-1:0] out_data,
  // instruction stream to the function controller
  output logic              cmd_valid,
  input  logic              cmd_ready,
  output logic [WORD_W-1:0] cmd_data,
  // result stream from the function controller
  input  logic              res_valid,
  output logic              res_ready,
  input  logic [WORD_W-1:0] res_data
);
  sync_fifo #(.WIDTH(WORD_W), .DEPTH(IN_DEPTH)) u_in_fifo (
    .clk, .rst_n,
    .in_valid (in_valid),  .in_ready (in_ready),  .in_data (in_data),
    .out_valid(cmd_valid), .out_ready(cmd_ready), .out_data(cmd_data)
  );

  sync_fifo #(.WIDTH(WORD_W), .DEPTH(OUT_DEPTH)) u_out_fifo (
    .clk, .rst_n,
    .in_valid (res_valid), .in_ready (res_ready), .in_data (res_data),
    .out_valid(out_valid), .out_ready(out_ready), .out_data(out_data)
  );

  // Handshake rules of the host input channel.
  a_in_hold: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid && !in_ready |=> in_valid && $stable(in_data));
  // The output channel never drops a word the host has not taken.
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_data));
endmodule
