// lut_counter_pp: t=1 LUT-Counter with the pre-processing stage in front.
//
// The P input bits (one column of P partial products) first pass through
// lut_preproc, which keeps their number of ones and guarantees that v_r is a
// subset of v_l.  Only those valid pre-processed words are stored: the
// memory has WORDS = 2*3^floor(P/2) words of Q bits (12 bits for the (3,2)
// counter, 162 bits for (7,3), 17,496 bits for (15,4)).  The row decoder
// still takes all P address lines v; it selects the word of a valid v by
// reading each bit pair (v_l[i], v_r[i]), which can only be 00, 10 or 11, as
// a ternary digit 0, 1 or 2, and v_m as the least significant binary digit:
//   row = 2 * sum_i (v_l[i] + v_r[i]) * 3^i + v_m.
// Word number row holds the number of ones it stands for, v_m plus the digit
// sum.  Storing only valid words follows the document; this numbering of the
// word lines is this design's choice.  The read is combinational.
module lut_counter_pp
  import lut_pkg::*;
#(
  parameter int P = 15,
  parameter int Q = counter_q(P, 1)
) (
  input  logic [P-1:0] w,
  output logic [Q-1:0] y
);
  localparam int H     = P / 2;
  localparam int WORDS = pp_words(P);
  localparam int RW    = $clog2(WORDS);

  // Content of stored word addr: the number of ones it represents.
  function automatic logic [Q-1:0] word_of(int addr);
    int s = addr % 2;
    int rest = addr / 2;
    for (int i = 0; i < H; i++) begin
      s += rest % 3;
      rest = rest / 3;
    end
    return Q'(s);
  endfunction

  logic [P-1:0]  v;
  logic [H-1:0]  v_l, v_r;
  logic          v_m;
  logic [RW-1:0] row;

  lut_preproc #(.P(P)) u_pre (.w(w), .v(v));

  assign v_l = v[P-1 -: H];
  assign v_m = v[H];
  assign v_r = v[H-1:0];

  // Row decoder over the valid addresses only.
  always_comb begin
    int idx;
    int pw;
    idx = 0;
    pw  = 1;
    for (int i = 0; i < H; i++) begin
      idx += (int'(v_l[i]) + int'(v_r[i])) * pw;
      pw  *= 3;
    end
    row = RW'(2 * idx + int'(v_m));
  end

  typedef logic [WORDS-1:0][Q-1:0] table_t;

  function automatic table_t build_table();
    table_t t;
    for (int a = 0; a < WORDS; a++) t[a] = word_of(a);
    return t;
  endfunction

  // Pre-calculated table contents, fixed at elaboration; word a is TABLE[a].
  localparam table_t TABLE = build_table();

  assign y = TABLE[row];

  if (Q < counter_q(P, 1)) begin : g_bad_q
    $error("lut_counter_pp: Q too small for P");
  end
endmodule
