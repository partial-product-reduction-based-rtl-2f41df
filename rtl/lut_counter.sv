// lut_counter: generic (p,t,q) LUT-Counter built as a table of
// pre-calculated results.
//
// The P*T input lines are P partial-product rows over T adjacent columns;
// x[r][u] is the bit of row r in column offset u, which has weight 2^u.  They
// address a memory of 2^(P*T) words of Q bits.  Word addr holds
//   sum over r,u of addr[r*T+u] * 2^u,
// the column-weighted count of ones, so the output y is that count for the
// applied bits.  Q defaults to the smallest width that holds P*(2^T-1); the
// default (5,2) counter with t=2 has Q=4 and a 4-Kbit table (equation (3) of
// the method: 2^(p*t)*q bits).  The table is filled at elaboration from
// that formula.  The read is combinational: one table access per count.
module lut_counter
  import lut_pkg::*;
#(
  parameter int P = 5,
  parameter int T = 2,
  parameter int Q = counter_q(P, T)
) (
  input  logic [P-1:0][T-1:0] x,
  output logic [Q-1:0]        y
);
  localparam int A     = P * T;
  localparam int WORDS = 1 << A;

  // Table content: weighted count of the ones in address addr.
  function automatic logic [Q-1:0] word_of(int addr);
    int s = 0;
    for (int r = 0; r < P; r++)
      for (int u = 0; u < T; u++)
        if (addr[r*T+u]) s += (1 << u);
    return Q'(s);
  endfunction

  typedef logic [WORDS-1:0][Q-1:0] table_t;

  function automatic table_t build_table();
    table_t t;
    for (int a = 0; a < WORDS; a++) t[a] = word_of(a);
    return t;
  endfunction

  // Pre-calculated table contents, fixed at elaboration; word a is TABLE[a].
  localparam table_t TABLE = build_table();

  assign y = TABLE[x];

  if (Q < counter_q(P, T)) begin : g_bad_q
    $error("lut_counter: Q too small for P*(2^T-1)");
  end
endmodule
