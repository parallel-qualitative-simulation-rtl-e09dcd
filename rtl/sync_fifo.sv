// sync_fifo: small synchronous first-in first-out buffer with valid/ready on
// both sides, used for the two host channels of the I/O controller.
//
// A word is written when in_valid and in_ready are both high and read when
// out_valid and out_ready are both high, in the same clock domain. in_ready is
// high while the buffer has room, out_valid while it holds a word; out_data
// shows the oldest word. Both may happen in one cycle, so a full-rate stream
// passes with no bubbles. Reset empties the buffer.
module sync_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 2,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    head, tail;
  logic [CW-1:0]    used;
  logic             push, pop;

  assign in_ready  = (used != CW'(DEPTH));
  assign out_valid = (used != '0);
  assign out_data  = mem[head];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  function automatic logic [AW-1:0] next(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push) mem[tail] <= in_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      head <= '0;
      tail <= '0;
      used <= '0;
    end else begin
      if (push) tail <= next(tail);
      if (pop)  head <= next(head);
      case ({push, pop})
        2'b10:   used <= used + 1'b1;
        2'b01:   used <= used - 1'b1;
        default: ;
      endcase
    end
  end
endmodule
