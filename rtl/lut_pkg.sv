// lut_pkg: constants and elaboration-time functions shared by the LUT-based
// partial product reduction.
//
// A LUT-Counter (p,t,q) counts p partial-product rows over t adjacent columns
// and returns the column-weighted number of ones on q lines; q is the
// smallest width that holds p*(2^t - 1).  The reduction tree repeats stages
// of such counters until two rows are left.  Its schedule, chosen here, uses
// the large pre-processed t=1 counter (P_BIG rows, the (15,4) counter by
// default) while the matrix is taller than the final counter accepts, then
// one stage of the final (P_FINAL, T_FINAL) counter, (5,2) with t=2 by
// default, which leaves two rows.  With these defaults a 24-row matrix is
// reduced in 3 stages (24 -> 8 -> 4 -> 2) and a 53-row matrix in 4
// (53 -> 16 -> 8 -> 4 -> 2), the stage counts the document reports for its
// combination of LUT counters.  The schedule itself is this design's choice.
package lut_pkg;

  // Output lines of a (p,t,q) LUT-Counter: enough for p*(2^t-1).
  function automatic int counter_q(int p, int t);
    return $clog2(p * ((1 << t) - 1) + 1);
  endfunction

  // Words held by a pre-processed t=1 LUT-Counter: 2 * 3^floor(p/2).
  function automatic int pp_words(int p);
    int w = 2;
    for (int i = 0; i < p / 2; i++) w = w * 3;
    return w;
  endfunction

  // Counter rows and columns used by the stage that receives height h.
  function automatic int stage_p(int h, int p_big, int p_final);
    return (h <= p_final) ? p_final : p_big;
  endfunction

  function automatic int stage_t(int h, int p_final, int t_final);
    return (h <= p_final) ? t_final : 1;
  endfunction

  // Height of the matrix after one stage of (p,t) counters on height h:
  // ceil(h/p) row groups, each giving ceil(q/t) bits per column.
  function automatic int stage_out_height(int h, int p, int t);
    int q = counter_q(p, t);
    return ((h + p - 1) / p) * ((q + t - 1) / t);
  endfunction

  // Height after s stages of the schedule, starting from n rows.
  function automatic int height_after(int n, int s, int p_big, int p_final, int t_final);
    int h = n;
    for (int i = 0; i < s; i++) begin
      if (h > 2)
        h = stage_out_height(h, stage_p(h, p_big, p_final),
                             stage_t(h, p_final, t_final));
    end
    return h;
  endfunction

  // Number of stages needed to reach two rows (or fewer).
  function automatic int num_stages(int n, int p_big, int p_final, int t_final);
    int h = n;
    int s = 0;
    while (h > 2 && s < 64) begin
      h = stage_out_height(h, stage_p(h, p_big, p_final),
                           stage_t(h, p_final, t_final));
      s++;
    end
    return s;
  endfunction

endpackage
