// siso_frame_test: end-to-end test of siso_decoder, used by the decoder
// testbenches. It generates random frames of input LLRs, feeds them in the
// decoder's block order, and compares every soft output, its stage index and
// its position in the output order with the reference model in siso_ref_pkg.
// It also checks the cycle timing (first output, one output per cycle, last
// output), that no sub-bank is ever asked twice in a cycle, and counts the
// events the schedule must produce: alpha-memory bypasses, dummy-to-beta
// handoffs, frame-end starts from equal metrics and same-boundary sub-bank
// reuse. With DEFAULT_DUT = 1 the decoder is instantiated with no parameter
// overrides (P, Q, L, N here must then equal its defaults).
module siso_frame_test
  import siso_pkg::*;
  import siso_ref_pkg::*;
#(
  parameter int unsigned P = 2,
  parameter int unsigned Q = 1,
  parameter int unsigned L = 32,
  parameter int unsigned N = 1024,
  parameter int unsigned FRAMES = 2,
  parameter bit          DEFAULT_DUT = 1'b0
) (
  output logic fin,
  output int   checks,
  output int   failures
);
  localparam int PP  = int'(P);
  localparam int QQ  = int'(Q);
  localparam int BL  = int'(L / Q);
  localparam int K   = int'(N) / BL;
  localparam int NSL = K + PP + 2 * QQ - 1;
  localparam int IDX_W = $clog2(N);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 1'b0, in_valid = 1'b0;
  llr_in_t in_sys = '0, in_par = '0, in_apr = '0;
  logic busy, in_ready, out_valid, done;
  logic [IDX_W-1:0] out_idx;
  llr_t out_llr, out_ext;
  logic ev_bypass, ev_handoff, ev_equal_start, ev_bank_reuse, mem_conflict;

  if (DEFAULT_DUT) begin : g_dut
    siso_decoder dut (
      .clk, .rst_n, .start, .busy, .in_ready, .in_valid, .in_sys, .in_par, .in_apr,
      .out_valid, .out_idx, .out_llr, .out_ext, .done,
      .alpha_bypass(ev_bypass), .ev_handoff, .ev_equal_start, .ev_bank_reuse, .mem_conflict
    );
  end else begin : g_dut
    siso_decoder #(.P(P), .Q(Q), .L(L), .N(N)) dut (
      .clk, .rst_n, .start, .busy, .in_ready, .in_valid, .in_sys, .in_par, .in_apr,
      .out_valid, .out_idx, .out_llr, .out_ext, .done,
      .alpha_bypass(ev_bypass), .ev_handoff, .ev_equal_start, .ev_bank_reuse, .mem_conflict
    );
  end

  int sys_v [N], par_v [N], apr_v [N];
  int exp_llr [N], exp_ext [N], exp_order [N];
  int n_bypass, n_handoff, n_equal, n_reuse, n_conflict;
  longint cyc;
  longint t_first_in, t_first_out, t_last_out, t_done;
  int n_out;
  bit active;

  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic make_frame();
    vec_t alf [N+1];
    vec_t b;
    int o, ga [N], gb [N];
    for (int t = 0; t < N; t++) begin
      sys_v[t] = int'($urandom_range(0, 63)) - 32;
      par_v[t] = int'($urandom_range(0, 63)) - 32;
      apr_v[t] = int'($urandom_range(0, 63)) - 32;
      ga[t] = sys_v[t] + apr_v[t];
      gb[t] = par_v[t];
    end
    alf[0] = start_vec();
    for (int t = 0; t < N; t++) alf[t+1] = fwd(alf[t], ga[t], gb[t]);
    o = 0;
    for (int n = 1; n <= K / PP; n++) begin
      b = zero_vec();
      if (n * PP < K)
        for (int t = ((n * PP + QQ < K) ? n * PP + QQ : K) * BL - 1; t >= n * PP * BL; t--)
          b = bwd(b, ga[t], gb[t]);
      for (int t = n * PP * BL - 1; t >= (n - 1) * PP * BL; t--) begin
        exp_llr[t] = llr(alf[t], b, ga[t], gb[t]);
        exp_ext[t] = exp_llr[t] - ga[t];
        exp_order[o++] = t;
        b = bwd(b, ga[t], gb[t]);
      end
    end
  endtask

  // output monitor
  always @(posedge clk) if (active) begin
    if (mem_conflict) n_conflict++;
    if (ev_bypass) n_bypass++;
    if (ev_handoff) n_handoff++;
    if (ev_equal_start) n_equal++;
    if (ev_bank_reuse) n_reuse++;
    if (in_ready && t_first_in < 0) t_first_in = cyc;
    if (out_valid) begin
      if (n_out == 0) t_first_out = cyc;
      if (n_out > 0) check(cyc == t_last_out + 1, "outputs not on consecutive cycles");
      t_last_out = cyc;
      if (n_out < N) begin
        check(int'(out_idx) == exp_order[n_out],
              $sformatf("output %0d: index %0d, expected %0d", n_out, out_idx, exp_order[n_out]));
        check(int'(out_llr) == exp_llr[out_idx],
              $sformatf("stage %0d: LLR %0d, expected %0d", out_idx, out_llr, exp_llr[out_idx]));
        check(int'(out_ext) == exp_ext[out_idx],
              $sformatf("stage %0d: extrinsic %0d, expected %0d", out_idx, out_ext, exp_ext[out_idx]));
      end
      n_out++;
    end
    if (done) t_done = cyc;
  end

  initial begin
    int ptr, t;
    fin = 0; checks = 0; failures = 0; cyc = 0; active = 0;
    n_bypass = 0; n_handoff = 0; n_equal = 0; n_reuse = 0; n_conflict = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < int'(FRAMES); f++) begin
      make_frame();
      n_out = 0; t_first_in = -1; t_done = -1; active = 1;
      @(posedge clk); #1 start = 1'b1;
      @(posedge clk); #1 start = 1'b0;
      ptr = 0;
      while (ptr < N) begin
        if (in_ready) begin
          t = (ptr / BL) * BL + BL - 1 - (ptr % BL);
          in_valid = 1'b1;
          in_sys = llr_in_t'(sys_v[t]);
          in_par = llr_in_t'(par_v[t]);
          in_apr = llr_in_t'(apr_v[t]);
          ptr++;
        end else begin
          in_valid = 1'b0;
        end
        @(posedge clk); #1;
      end
      in_valid = 1'b0;
      wait (t_done >= 0);
      @(posedge clk); #1;
      check(n_out == N, $sformatf("frame %0d: %0d outputs, expected %0d", f, n_out, N));
      check(t_first_out - t_first_in == longint'((PP + 2 * QQ - 1) * BL + 2),
            $sformatf("first output after %0d cycles", t_first_out - t_first_in));
      check(t_done - t_first_in == longint'(NSL * BL + 1),
            $sformatf("done after %0d cycles, expected %0d", t_done - t_first_in, NSL * BL + 1));
      check(t_done == t_last_out, "done not with the last output");
      check(!busy, "still busy after done");
      active = 0;
    end
    check(n_conflict == 0, $sformatf("%0d sub-bank conflicts", n_conflict));
    check(n_bypass > 0,  "alpha bypass never happened");
    check(n_handoff == int'(FRAMES) * (K / PP - 1), $sformatf("%0d dummy handoffs", n_handoff));
    check(n_equal == int'(FRAMES), $sformatf("%0d frame-end starts", n_equal));
    check(n_reuse > 0, "sub-bank reuse at a slot boundary never happened");
    $display("events: bypass=%0d handoff=%0d equal_start=%0d bank_reuse=%0d",
             n_bypass, n_handoff, n_equal, n_reuse);
    fin = 1;
  end

endmodule
