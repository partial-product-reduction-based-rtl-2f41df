// reduction_tree: LUT-Counter reduction of N partial products to two rows,
// one pipeline segment per reduction level.
//
// The tree is a chain of reduction_stage levels.  While the matrix is taller
// than P_FINAL rows a level uses pre-processed (P_BIG,1) LUT-Counters; the
// last level uses full-table (P_FINAL,T_FINAL) LUT-Counters, which leave two
// rows.  With the defaults (15,4) and (5,2) counters, 24 rows take 3 levels
// (24 -> 8 -> 4 -> 2) and 53 rows take 4 (53 -> 16 -> 8 -> 4 -> 2).  The
// document gives the counter types and these stage counts; the schedule that
// combines them is this design's choice (see lut_pkg).
//
// Timing: with PIPELINE set, every level is followed by a register, so a new
// matrix can enter every cycle (segmented operation) and out_valid/row0/row1
// follow in_valid/m_in by STAGES cycles.  With PIPELINE clear the tree is
// combinational and the latency is 0.  rst_n (active low, synchronous)
// clears only the valid flags; the data registers need no reset because
// they are qualified by them.
module reduction_tree
  import lut_pkg::*;
#(
  parameter int N        = 24,
  parameter int W        = 2 * N,
  parameter int P_BIG    = 15,
  parameter int P_FINAL  = 5,
  parameter int T_FINAL  = 2,
  parameter bit PIPELINE = 1'b1,
  parameter int STAGES   = num_stages(N, P_BIG, P_FINAL, T_FINAL)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [N-1:0][W-1:0] m_in,
  output logic                out_valid,
  output logic [W-1:0]        row0,
  output logic [W-1:0]        row1
);
  localparam int HM = (N > 2) ? N : 2;

  // mat[s] is the matrix entering level s; mat[STAGES] has at most two rows.
  logic [HM-1:0][W-1:0] mat [STAGES+1];
  logic                 vld [STAGES+1];

  always_comb begin
    mat[0] = '0;
    mat[0][N-1:0] = m_in;
  end
  assign vld[0] = in_valid;

  for (genvar s = 0; s < STAGES; s++) begin : g_lvl
    localparam int HI = height_after(N, s, P_BIG, P_FINAL, T_FINAL);
    localparam int HO = height_after(N, s + 1, P_BIG, P_FINAL, T_FINAL);
    localparam int PS = stage_p(HI, P_BIG, P_FINAL);
    localparam int TS = stage_t(HI, P_FINAL, T_FINAL);

    logic [HO-1:0][W-1:0] red;
    logic [HM-1:0][W-1:0] red_full;

    reduction_stage #(
      .W(W), .H_IN(HI), .P(PS), .T(TS), .PREPROC(1'b1), .H_OUT(HO)
    ) u_stage (
      .m_in (mat[s][HI-1:0]),
      .m_out(red)
    );

    always_comb begin
      red_full = '0;
      red_full[HO-1:0] = red;
    end

    if (PIPELINE) begin : g_reg
      always_ff @(posedge clk) begin
        mat[s+1] <= red_full;
        if (!rst_n) vld[s+1] <= 1'b0;
        else        vld[s+1] <= vld[s];
      end
    end else begin : g_comb
      assign mat[s+1] = red_full;
      assign vld[s+1] = vld[s];
    end
  end

  assign row0      = mat[STAGES][0];
  assign row1      = mat[STAGES][1];
  assign out_valid = vld[STAGES];

  if (STAGES != num_stages(N, P_BIG, P_FINAL, T_FINAL)) begin : g_bad_stages
    $error("reduction_tree: STAGES must match the schedule");
  end
  if (N < 2) begin : g_bad_n
    $error("reduction_tree: N must be at least 2");
  end
endmodule
