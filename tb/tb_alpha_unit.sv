// tb_alpha_unit: forward recursion. Runs random branch-metric sequences from
// the frame-start state and compares every alpha vector with the reference.
module tb_alpha_unit;
  import siso_pkg::*;
  import siso_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 0, frame_start = 0, en = 0;
  bm_word_t gamma = '0;
  sm_vec_t alpha;
  int checks = 0, failures = 0;

  alpha_unit dut (.clk, .rst_n, .frame_start, .en, .gamma, .alpha);

  task automatic cmp(input vec_t r, input string s);
    bit ok;
    ok = 1;
    for (int i = 0; i < NSTATE; i++) if (int'(alpha[i]) != r[i]) ok = 0;
    checks++;
    if (!ok) begin failures++; if (failures < 5) $display("FAIL: %s", s); end
  endtask

  initial begin
    vec_t r;
    int ga, gb;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 4; f++) begin
      frame_start = 1; @(negedge clk); frame_start = 0;
      r = start_vec();
      cmp(r, "frame start");
      for (int t = 0; t < 200; t++) begin
        ga = int'($urandom_range(0, 127)) - 64;
        gb = int'($urandom_range(0, 63)) - 32;
        gamma.ga = gcomp_t'(ga); gamma.gb = gcomp_t'(gb);
        en = ($urandom_range(0, 3) != 0);
        @(negedge clk);
        if (en) r = fwd(r, ga, gb);
        cmp(r, $sformatf("frame %0d stage %0d", f, t));
      end
      en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
