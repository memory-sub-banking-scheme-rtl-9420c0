// siso_decoder: sliding-window max*-MAP soft-input soft-output decoder with an
// optimal single-port sub-banked memory.
//
// Each clock the decoder takes one trellis stage of input LLRs (systematic,
// parity, a-priori), turns it into a branch-metric word and stores it in one of
// p+2q data sub-banks. A forward unit computes the alpha metrics block by block
// from the start of the frame and stores them in one of p+1 alpha sub-banks. A
// dummy backward unit runs over the q blocks after each group of p blocks,
// starting from equal metrics (ceil(q/p) such units take turns when q > p),
// and hands its final metrics to the actual
// backward unit, which walks back through the group and, together with the
// stored alphas and branch metrics, yields one a-posteriori and one extrinsic
// LLR per clock. Every sub-bank sees at most one access per clock.
//
// Interface and timing: pulse `start` (while not busy); from the next cycle
// `in_ready` is high for K*L/q cycles and a stage must be presented with
// `in_valid` in each of them. Blocks arrive in order, the L/q stages of each
// block in reverse order (last stage first), so the dummy recursion can run on
// the data as it is stored. Outputs carry their stage index `out_idx`; they come
// group by group, blocks of a group in reverse order, stages in reverse order.
// The first output appears (p+2q-1)*L/q + 2 cycles after the first input and
// the N outputs follow on consecutive cycles; the last one comes with `done`.
// From the first input to the last output inclusive the frame takes
// N + (p+2q-1)*L/q + 2 cycles: the paper's latency formula (Eq. 2, M = 1)
// with a pipeline latency Delta of 2 cycles.
//
// The memory organisation, the slot schedule and the sizes (p+2q and p+1
// sub-banks of L/q words, eta = p/q = 2 by default, as in the paper's worked
// example) follow the paper. The code (3GPP 8-state), word formats, L, N,
// the stage order inside a block, the frame-end rules (a dummy pass stops at the
// last block; the last group's backward recursion starts from equal metrics),
// the number of dummy units and the alpha-memory bypass are this
// design's choices. Only the M = 1 case (no interleaving of blocks) is built.
module siso_decoder
  import siso_pkg::*;
#(
  parameter int unsigned P = 2,
  parameter int unsigned Q = 1,
  parameter int unsigned L = 32,
  parameter int unsigned N = 1024,
  localparam int unsigned BL    = L / Q,
  localparam int unsigned NBD   = P + 2 * Q,
  localparam int unsigned NBA   = P + 1,
  localparam int unsigned ND    = (Q + P - 1) / P,
  localparam int unsigned DSW   = (ND > 1) ? $clog2(ND) : 1,
  localparam int unsigned DBW   = $clog2(NBD),
  localparam int unsigned ABW   = (NBA > 1) ? $clog2(NBA) : 1,
  localparam int unsigned AW    = (BL > 1) ? $clog2(BL) : 1,
  localparam int unsigned IDX_W = $clog2(N)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic             busy,
  output logic             in_ready,
  input  logic             in_valid,
  input  llr_in_t          in_sys,
  input  llr_in_t          in_par,
  input  llr_in_t          in_apr,
  output logic             out_valid,
  output logic [IDX_W-1:0] out_idx,
  output llr_t             out_llr,
  output llr_t             out_ext,
  output logic             done,
  // event flags, one cycle each, for monitoring
  output logic             alpha_bypass,   // alpha-memory forwarding this cycle
  output logic             ev_handoff,     // beta pass starts from the dummy metrics
  output logic             ev_equal_start, // beta pass starts from equal metrics (frame end)
  output logic             ev_bank_reuse,  // a data sub-bank freed and refilled at one slot boundary
  output logic             mem_conflict    // a sub-bank was asked twice (never expected)
);

  // controller
  logic [15:0]    slot;
  logic [AW-1:0]  stage;
  logic           wr_en;
  logic [DBW-1:0] wr_bank;
  logic [AW-1:0]  wr_addr;
  logic           al_re, al_en_q;
  logic [DBW-1:0] al_bank;
  logic [AW-1:0]  al_addr;
  logic [ABW-1:0] aw_bank_q;
  logic [AW-1:0]  aw_addr_q;
  logic           dm_re [ND], dm_en_q [ND], dm_init_q [ND], dm_src_in_q [ND];
  logic [DBW-1:0] dm_bank [ND];
  logic [AW-1:0]  dm_addr [ND];
  logic [DSW-1:0] bt_dsel_q;
  logic           bt_re, bt_en_q, bt_init_q, bt_from_dummy_q, last_q;
  logic [DBW-1:0] bt_bank;
  logic [ABW-1:0] bt_abank;
  logic [AW-1:0]  bt_addr;
  logic [IDX_W-1:0] bt_idx_q;
  logic           bank_reuse;

  sw_controller #(.P(P), .Q(Q), .L(L), .N(N)) u_ctrl (
    .clk, .rst_n, .start, .busy, .slot, .stage,
    .wr_en, .wr_bank, .wr_addr,
    .al_re, .al_bank, .al_addr, .al_en_q, .aw_bank_q, .aw_addr_q,
    .dm_re, .dm_bank, .dm_addr, .dm_en_q, .dm_init_q, .dm_src_in_q,
    .bt_re, .bt_bank, .bt_abank, .bt_addr, .bt_en_q, .bt_init_q,
    .bt_from_dummy_q, .bt_dsel_q, .bt_idx_q, .last_q, .bank_reuse
  );

  assign in_ready = wr_en;

  // branch-metric word of the incoming stage
  bm_word_t in_word, in_word_q;
  assign in_word.ga = gcomp_t'(in_sys) + gcomp_t'(in_apr);
  assign in_word.gb = gcomp_t'(in_par);

  always_ff @(posedge clk) in_word_q <= in_word;

  // data memory
  bm_word_t al_data, bt_data;
  bm_word_t dm_data [ND];
  logic     dconf;

  data_mem #(.NB(NBD), .DEPTH(BL), .ND(ND)) u_dmem (
    .clk, .rst_n,
    .we(wr_en && in_valid), .wbank(wr_bank), .waddr(wr_addr), .wdata(in_word),
    .a_re(al_re), .a_bank(al_bank), .a_addr(al_addr), .a_rdata(al_data),
    .b_re(bt_re), .b_bank(bt_bank), .b_addr(bt_addr), .b_rdata(bt_data),
    .d_re(dm_re), .d_bank(dm_bank), .d_addr(dm_addr), .d_rdata(dm_data),
    .conflict(dconf)
  );

  // forward recursion and alpha memory
  sm_vec_t alpha, bt_alpha;
  logic    aconf;

  alpha_unit u_alpha (
    .clk, .rst_n, .frame_start(start && !busy), .en(al_en_q), .gamma(al_data),
    .alpha
  );

  alpha_mem #(.NB(NBA), .DEPTH(BL)) u_amem (
    .clk, .rst_n,
    .we(al_en_q), .wbank(aw_bank_q), .waddr(aw_addr_q), .wdata(alpha),
    .re(bt_re), .rbank(bt_abank), .raddr(bt_addr), .rdata(bt_alpha),
    .bypass(alpha_bypass), .conflict(aconf)
  );

  // dummy backward recursions (one unit unless q > p)
  sm_vec_t dm_beta [ND];

  for (genvar u = 0; u < ND; u++) begin : g_dummy
    sm_vec_t  dm_cur;
    bm_word_t dm_gamma;
    assign dm_gamma = dm_src_in_q[u] ? in_word_q : dm_data[u];

    beta_unit u_dummy (
      .clk, .rst_n, .en(dm_en_q[u]), .init(dm_init_q[u]), .init_val('0),
      .gamma(dm_gamma), .beta_cur(dm_cur), .beta(dm_beta[u])
    );
  end

  // actual backward recursion
  sm_vec_t bt_cur, bt_beta, bt_start;
  assign bt_start = bt_from_dummy_q ? dm_beta[bt_dsel_q] : '0;

  beta_unit u_beta (
    .clk, .rst_n, .en(bt_en_q), .init(bt_init_q), .init_val(bt_start),
    .gamma(bt_data), .beta_cur(bt_cur), .beta(bt_beta)
  );

  // soft output
  llr_unit #(.IDX_W(IDX_W)) u_llr (
    .clk, .rst_n, .in_valid(bt_en_q), .in_idx(bt_idx_q),
    .alpha(bt_alpha), .gamma(bt_data), .beta(bt_cur),
    .out_valid, .out_idx, .out_llr, .out_ext
  );

  always_ff @(posedge clk) begin
    if (!rst_n) done <= 1'b0;
    else        done <= last_q;
  end

  assign mem_conflict   = dconf || aconf;
  assign ev_handoff     = bt_en_q && bt_init_q && bt_from_dummy_q;
  assign ev_equal_start = bt_en_q && bt_init_q && !bt_from_dummy_q;
  assign ev_bank_reuse  = bank_reuse;

  // the input must keep pace with the schedule
  a_input_stream: assert property (@(posedge clk) disable iff (!rst_n)
                                   in_ready |-> in_valid);

endmodule
