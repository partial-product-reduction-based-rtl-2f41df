// pp_generator: partial product generation for an unsigned N x N multiply.
//
// Row i of the output matrix is the multiplicand a shifted left by i and
// gated by multiplier bit b[i] (an AND array), held in a W = 2N column
// matrix so that column c has weight 2^c.  The sum of the N rows is a*b.
// The document names this stage but does not describe it; plain AND-array
// generation of unsigned operands is this design's choice.  Combinational.
module pp_generator #(
  parameter int N = 24,
  parameter int W = 2 * N
) (
  input  logic [N-1:0]        a,
  input  logic [N-1:0]        b,
  output logic [N-1:0][W-1:0] pp
);
  always_comb begin
    for (int i = 0; i < N; i++)
      pp[i] = b[i] ? (W'(a) << i) : '0;
  end
endmodule
