// filo: first-in-last-out buffer (a stack).
//
// The trace-back unit recovers decoded bits from the last one to the first;
// this buffer turns them back into transmission order. Entries sit in a
// register array; `count` is the number of stored entries and doubles as the
// stack pointer. A push writes at `count`, a pop returns the entry at
// count-1. The output `top` shows the most recent entry combinationally, so
// a pop consumes the value shown in the same cycle. Push and pop in the same
// cycle replace the top entry.
//
// Pushing into a full buffer or popping an empty one is a protocol error,
// checked by assertions and otherwise ignored. Depth and width are
// parameters; the register array is this design's own choice.
module filo #(
  parameter int unsigned DEPTH = viterbi_pkg::FRAME_LEN,
  parameter int unsigned W     = 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  logic [W-1:0]               din,
  input  logic                       pop,
  output logic [W-1:0]               top,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [DEPTH-1:0][W-1:0] mem;

  assign empty = (count == '0);
  assign full  = (count == CW'(DEPTH));
  assign top   = empty ? '0 : mem[count - CW'(1)];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      mem   <= '0;
    end else begin
      if (push && pop && !empty) begin
        mem[count - CW'(1)] <= din;
      end else if (push && !full) begin
        mem[count] <= din;
        count      <= count + CW'(1);
      end else if (pop && !empty) begin
        count      <= count - CW'(1);
      end
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && !pop && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));

endmodule
