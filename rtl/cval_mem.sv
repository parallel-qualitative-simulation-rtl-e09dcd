// cval_mem: the corresponding-value tuple memory of the MULT-CCF.
//
// The list of corresponding-value tuples (a, b, c) is kept in three banks, one
// per variable, so that a whole tuple is read in one cycle. Tuples are
// appended at the end of the list (the list only grows during a simulation)
// or the whole list is cleared. The read side has no address input: a read
// pointer is stepped by the SF3 sequencer and wraps from the last stored tuple
// back to the first (auto-increment, circular addressing).
//
// LANES read ports show the tuples at the pointer and the LANES-1 positions
// after it, each wrapping at the end of the list, for an array of SF3 units.
// With LANES = 1 (the default, one SF3 iteration per cycle) this is a single
// read port. `step` (0..LANES) moves the pointer by that many positions at the
// clock edge.
//
// Interface and timing: `rdata` is read asynchronously, as from LUT RAM.
// `clr`, `wr` and `step` act at the clock edge; `clr` wins over `wr`. An
// append to a full list is dropped. The three banks and the circular
// auto-increment follow the document; the depth, asynchronous read, full
// behaviour and the multi-lane read are this design's choices.
module cval_mem
  import qsim_pkg::*;
#(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned LANES = 1,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW   = $clog2(DEPTH + 1),
  localparam int unsigned LW   = $clog2(LANES + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          wr,
  input  cval_tuple_t   wdata,
  input  logic [LW-1:0] step,
  output cval_tuple_t   rdata [LANES],
  output logic [CW-1:0] count,
  output logic          full
);
  qmag_t bank1 [DEPTH];
  qmag_t bank2 [DEPTH];
  qmag_t bank3 [DEPTH];

  logic [AW-1:0] rd_ptr;
  logic [AW-1:0] wr_ptr;
  logic [AW-1:0] idx [LANES+1];   // pointer, pointer+1, ... wrapping at count

  assign full   = (count == CW'(DEPTH));
  assign wr_ptr = AW'(count);

  always_comb begin
    idx[0] = rd_ptr;
    for (int j = 1; j <= LANES; j++)
      idx[j] = (CW'(idx[j-1]) + 1'b1 >= count) ? '0 : idx[j-1] + 1'b1;
  end

  for (genvar j = 0; j < LANES; j++) begin : g_rd
    assign rdata[j] = '{c1: bank1[idx[j]], c2: bank2[idx[j]], c3: bank3[idx[j]]};
  end

  always_ff @(posedge clk) begin
    if (wr && !clr && !full) begin
      bank1[wr_ptr] <= wdata.c1;
      bank2[wr_ptr] <= wdata.c2;
      bank3[wr_ptr] <= wdata.c3;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      count  <= '0;
      rd_ptr <= '0;
    end else begin
      if (wr && !full) count <= count + 1'b1;
      if (count != '0) rd_ptr <= idx[step];
    end
  end

  a_step_range: assert property (@(posedge clk) disable iff (!rst_n)
    int'(step) <= LANES);
endmodule
