// asc_mask_stack - responder mask stack of a Parallel PE (8 x 1 bit).
//
// The top bit says whether the PE is a responder: it enables the PE's ID/EX
// latch and, when 0, puts the Data Switch in Bypass Mode. A push stores a new
// search result; a pop restores the previous responder set, so searches can be
// nested. After reset every entry is 1 (all PEs respond). The push ANDs the
// search result with the current top, so a nested search narrows the
// responder set; a push on a full stack drops the bottom entry and a pop on an
// empty stack leaves the bottom entry at 1. Depth 8 is the published size; the
// AND on push and the over/underflow behaviour are this design's choices.
// Push and pop take effect on the clock edge that ends the ID stage.
module asc_mask_stack #(
  parameter int unsigned DEPTH = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic push,
  input  logic push_bit,
  input  logic pop,
  output logic top
);
  logic [DEPTH-1:0] stack;   // stack[0] is the top

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stack <= '1;
    end else if (push) begin
      stack <= {stack[DEPTH-2:0], push_bit & stack[0]};
    end else if (pop) begin
      stack <= {1'b1, stack[DEPTH-1:1]};
    end
  end

  assign top = stack[0];
endmodule
