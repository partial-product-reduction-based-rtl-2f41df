// lut_multiplier: segmented unsigned N x N multiplier whose partial product
// reduction is made of LUT-Counters.
//
// The three classic stages are kept: pp_generator forms the N partial
// products, reduction_tree reduces them to two rows with levels of
// table-based counters (pre-processed (15,4) counters, then one level of
// (5,2) counters with t=2), and final_adder adds the two rows.  N defaults
// to 24, the single-precision mantissa width the document evaluates; N=53
// gives the double-precision case.
//
// Interface: a, b and in_valid are sampled together; p = a*b (2N bits)
// appears with out_valid LATENCY = STAGES + 1 cycles later (4 for N=24, 5 for
// N=53): one register after each reduction level and one after the final
// adder.  A new operand pair may be given every cycle.  rst_n is active low
// and synchronous and clears the valid flags.  The pipeline placement and
// the handshake are this design's choices.
module lut_multiplier
  import lut_pkg::*;
#(
  parameter int N       = 24,
  parameter int P_BIG   = 15,
  parameter int P_FINAL = 5,
  parameter int T_FINAL = 2,
  parameter int STAGES  = num_stages(N, P_BIG, P_FINAL, T_FINAL),
  parameter int LATENCY = STAGES + 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic           out_valid,
  output logic [2*N-1:0] p
);
  localparam int W = 2 * N;

  logic [N-1:0][W-1:0] pp;
  logic [W-1:0]        row0, row1, sum;
  logic                red_valid;

  pp_generator #(.N(N), .W(W)) u_ppg (.a(a), .b(b), .pp(pp));

  reduction_tree #(
    .N(N), .W(W), .P_BIG(P_BIG), .P_FINAL(P_FINAL), .T_FINAL(T_FINAL),
    .PIPELINE(1'b1), .STAGES(STAGES)
  ) u_tree (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .m_in     (pp),
    .out_valid(red_valid),
    .row0     (row0),
    .row1     (row1)
  );

  final_adder #(.W(W)) u_add (.x(row0), .y(row1), .s(sum));

  always_ff @(posedge clk) begin
    p <= sum;
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= red_valid;
  end

  if (LATENCY != STAGES + 1) begin : g_bad_lat
    $error("lut_multiplier: LATENCY must be STAGES + 1");
  end
endmodule
