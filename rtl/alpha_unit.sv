// alpha_unit: forward state-metric recursion (alpha) of the max*-MAP decoder.
//
// Holds the alpha metrics of all NS states. `frame_start` loads the metrics of
// a frame that begins in state 0 (0 for state 0, SM_NEG for the others). Each
// cycle with `en` high consumes the branch metrics of one stage and replaces
// the metrics by alpha_t[s'] = max*{alpha_{t-1}[s] + gamma_t(s,u)} over the two
// transitions (s,u) entering s', renormalised by subtracting the new metric of
// state 0. `alpha` is the register, i.e. the metrics entering the stage whose
// branch metrics are presented; this is the word the decoder stores in the
// alpha memory. One stage per clock, no internal pipelining (the paper's
// M = 1 configuration). The recursion follows the paper's MAP equation; the
// renormalisation and the start state are this design's choices.
module alpha_unit
  import siso_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     frame_start,
  input  logic     en,
  input  bm_word_t gamma,
  output sm_vec_t  alpha
);

  sm_vec_t nxt;

  always_comb begin
    logic signed [LLR_W+1:0] acc [NS];
    logic                    seen [NS];
    logic signed [LLR_W+1:0] m;
    logic [2:0]              ns;
    for (int s = 0; s < NS; s++) begin
      acc[s]  = '0;
      seen[s] = 1'b0;
    end
    for (int s = 0; s < NS; s++) begin
      for (int u = 0; u < 2; u++) begin
        ns = next_state(3'(s), u[0]);
        m  = (LLR_W+2)'(alpha[s]) + (LLR_W+2)'(branch_metric(gamma, 3'(s), u[0]));
        acc[ns]  = seen[ns] ? max_star(acc[ns], m) : m;
        seen[ns] = 1'b1;
      end
    end
    for (int s = 0; s < NS; s++)
      nxt[s] = SM_W'(acc[s] - acc[0]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n || frame_start) begin
      for (int s = 0; s < NS; s++) alpha[s] <= (s == 0) ? sm_t'(0) : SM_NEG;
    end else if (en) begin
      alpha <= nxt;
    end
  end

endmodule
