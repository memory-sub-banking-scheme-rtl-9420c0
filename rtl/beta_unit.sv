// beta_unit: backward state-metric recursion (beta) of the max*-MAP decoder.
//
// The decoder uses these as dummy-beta units (one, or ceil(q/p) when q > p),
// which start from equal metrics L stages beyond a window to acquire a reliable
// starting point, and as the actual-beta unit, which starts from a dummy unit's final metrics and
// walks back through the window while the soft outputs are produced.
// `beta_cur` is the metric vector valid for the stage whose branch metrics are
// presented: `init_val` when `init` is high (first stage of a pass), the
// register otherwise. With `en` high the register takes
// beta_{t-1}[s] = max*{gamma_t(s,u) + beta_t[next(s,u)]} over u, renormalised by
// subtracting the new metric of state 0. One stage per clock. The recursion is
// the paper's; the renormalisation is this design's choice.
module beta_unit
  import siso_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     en,
  input  logic     init,
  input  sm_vec_t  init_val,
  input  bm_word_t gamma,
  output sm_vec_t  beta_cur,
  output sm_vec_t  beta
);

  sm_vec_t nxt;

  assign beta_cur = init ? init_val : beta;

  always_comb begin
    logic signed [LLR_W+1:0] acc [NS];
    logic signed [LLR_W+1:0] m0, m1;
    for (int s = 0; s < NS; s++) begin
      m0 = (LLR_W+2)'(branch_metric(gamma, 3'(s), 1'b0))
         + (LLR_W+2)'(beta_cur[next_state(3'(s), 1'b0)]);
      m1 = (LLR_W+2)'(branch_metric(gamma, 3'(s), 1'b1))
         + (LLR_W+2)'(beta_cur[next_state(3'(s), 1'b1)]);
      acc[s] = max_star(m0, m1);
    end
    for (int s = 0; s < NS; s++)
      nxt[s] = SM_W'(acc[s] - acc[0]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n)
      beta <= '0;
    else if (en)
      beta <= nxt;
  end

endmodule
