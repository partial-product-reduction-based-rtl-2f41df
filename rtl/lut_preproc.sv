// lut_preproc: pre-processing stage in front of a t=1 LUT-Counter.
//
// The P-bit word w to be counted is split into three fields, following the
// document: w_l (the upper floor(P/2) bits), the middle bit w_m and w_r (the
// lower floor(P/2) bits).  The output v keeps the same layout with
//   v_l = w_l | w_r,   v_m = w_m,   v_r = w_l & w_r   (bitwise).
// For every bit position popcount(a|b) + popcount(a&b) = popcount(a) +
// popcount(b), so v has as many ones as w, while v can only take values with
// v_r a subset of v_l: 2*3^floor(P/2) values instead of 2^P.  The LUT behind
// it therefore needs only that many words.  P must be odd, as in every
// counter the document sizes (3, 7, 15, 31).  Purely combinational.
module lut_preproc #(
  parameter int P = 7
) (
  input  logic [P-1:0] w,
  output logic [P-1:0] v
);
  localparam int H = P / 2;

  logic [H-1:0] w_l, w_r;
  logic         w_m;

  assign w_l = w[P-1 -: H];
  assign w_m = w[H];
  assign w_r = w[H-1:0];

  assign v = {w_l | w_r, w_m, w_l & w_r};

  if (P % 2 != 1 || P < 3) begin : g_bad_p
    $error("lut_preproc: P must be odd and at least 3");
  end
endmodule
