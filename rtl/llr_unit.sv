// llr_unit: soft-output (extrinsic) unit of the max*-MAP decoder.
//
// For one trellis stage t it forms, over all 16 transitions,
// alpha_{t-1}[s] + gamma_t(s,u) + beta_t[next(s,u)], takes max* separately over
// the u = 1 and the u = 0 transitions and outputs their difference, the
// a-posteriori LLR (the paper's Eq. (1) with max*). The extrinsic LLR is that
// value minus the systematic-plus-a-priori part of the branch metric (ga).
// Inputs are combinational; outputs are registered, so a stage presented in
// cycle c leaves with `out_valid` in cycle c+1 together with its index `idx`.
module llr_unit
  import siso_pkg::*;
#(
  parameter int unsigned IDX_W = 10
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [IDX_W-1:0] in_idx,
  input  sm_vec_t          alpha,
  input  bm_word_t         gamma,
  input  sm_vec_t          beta,
  output logic             out_valid,
  output logic [IDX_W-1:0] out_idx,
  output llr_t             out_llr,
  output llr_t             out_ext
);

  logic signed [LLR_W+1:0] lam, ext;

  always_comb begin
    logic signed [LLR_W+1:0] acc [2];
    logic signed [LLR_W+1:0] m;
    for (int u = 0; u < 2; u++) begin
      acc[u] = '0;
      for (int s = 0; s < NS; s++) begin
        m = (LLR_W+2)'(alpha[s])
          + (LLR_W+2)'(branch_metric(gamma, 3'(s), u[0]))
          + (LLR_W+2)'(beta[next_state(3'(s), u[0])]);
        acc[u] = (s == 0) ? m : max_star(acc[u], m);
      end
    end
    lam = acc[1] - acc[0];
    ext = lam - (LLR_W+2)'(gamma.ga);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_idx <= in_idx;
        out_llr <= LLR_W'(lam);
        out_ext <= LLR_W'(ext);
      end
    end
  end

endmodule
