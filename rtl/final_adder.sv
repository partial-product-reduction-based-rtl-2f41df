// final_adder: final carry-propagate addition of the two rows left by the
// reduction tree.
//
// s = x + y modulo 2^W.  The document names this stage but does not describe
// its structure; a plain word-level adder, left to synthesis to map, is this
// design's choice.  Combinational.
module final_adder #(
  parameter int W = 48
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] s
);
  assign s = x + y;
endmodule
