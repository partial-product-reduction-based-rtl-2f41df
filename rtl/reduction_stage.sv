// reduction_stage: one level of LUT-Counters over a partial-product matrix.
//
// The input is a matrix of H_IN rows by W columns (bit m_in[r][c] has weight
// 2^c).  Its rows are cut into G = ceil(H_IN/P) groups of P rows and its
// columns into tiles of T columns starting at multiples of T, as in the
// document's picture of a reduction level.  Every group-by-tile block feeds
// one LUT-Counter, rows beyond H_IN or columns beyond W reading as 0.  Output
// bit j of the counter on tile start s has weight 2^(s+j) and goes to column
// s+j of the output matrix, in row g*ceil(Q/T) + j/T; no two counters share
// an output position.  The output therefore has H_OUT = G*ceil(Q/T) rows and
// the same weighted sum as the input, modulo 2^W (bits of weight 2^W and
// above are dropped, which is exact when the full sum fits in W bits, as for
// a product).  With T = 1 and PREPROC set the counters are pre-processed
// LUT-Counters (lut_counter_pp), otherwise full-table LUT-Counters
// (lut_counter).  Output positions that no counter can reach (for example
// the upper slots of the lowest columns) are constant 0.  Purely
// combinational.
module reduction_stage
  import lut_pkg::*;
#(
  parameter int W       = 48,
  parameter int H_IN    = 24,
  parameter int P       = 15,
  parameter int T       = 1,
  parameter bit PREPROC = 1'b1,
  parameter int H_OUT   = stage_out_height(H_IN, P, T)
) (
  input  logic [H_IN-1:0][W-1:0]  m_in,
  output logic [H_OUT-1:0][W-1:0] m_out
);
  localparam int Q     = counter_q(P, T);
  localparam int G     = (H_IN + P - 1) / P;
  localparam int K     = (W + T - 1) / T;     // tiles per row group
  localparam int SLOTS = (Q + T - 1) / T;     // output rows per row group

  // Counter results, indexed by group and tile.
  logic [Q-1:0] cnt [G][K];

  for (genvar g = 0; g < G; g++) begin : g_grp
    for (genvar k = 0; k < K; k++) begin : g_tile
      logic [P-1:0][T-1:0] x;
      for (genvar r = 0; r < P; r++) begin : g_r
        for (genvar u = 0; u < T; u++) begin : g_u
          if (g*P + r < H_IN && k*T + u < W) begin : g_bit
            assign x[r][u] = m_in[g*P + r][k*T + u];
          end else begin : g_zero
            assign x[r][u] = 1'b0;
          end
        end
      end
      if (T == 1 && PREPROC) begin : g_pp
        logic [P-1:0] w;
        for (genvar r = 0; r < P; r++) begin : g_w
          assign w[r] = x[r][0];
        end
        lut_counter_pp #(.P(P), .Q(Q)) u_cnt (.w(w), .y(cnt[g][k]));
      end else begin : g_full
        lut_counter #(.P(P), .T(T), .Q(Q)) u_cnt (.x(x), .y(cnt[g][k]));
      end
    end
  end

  // Place every counter output bit at its weight.
  always_comb begin
    m_out = '0;
    for (int g = 0; g < G; g++)
      for (int k = 0; k < K; k++)
        for (int j = 0; j < Q; j++)
          if (k*T + j < W)
            m_out[g*SLOTS + j/T][k*T + j] = cnt[g][k][j];
  end

  if (H_OUT != G * SLOTS) begin : g_bad_h
    $error("reduction_stage: H_OUT must equal ceil(H_IN/P)*ceil(Q/T)");
  end
endmodule
