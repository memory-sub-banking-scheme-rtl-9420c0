// tb_beta_unit: backward recursion. Starts passes from random initial vectors
// (init) and from the register, and compares beta_cur and the register with
// the reference after every stage.
module tb_beta_unit;
  import siso_pkg::*;
  import siso_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 0, en = 0, init = 0;
  sm_vec_t init_val = '0, beta_cur, beta;
  bm_word_t gamma = '0;
  int checks = 0, failures = 0;

  beta_unit dut (.clk, .rst_n, .en, .init, .init_val, .gamma, .beta_cur, .beta);

  task automatic cmp(input sm_vec_t v, input vec_t r, input string s);
    bit ok;
    ok = 1;
    for (int i = 0; i < NSTATE; i++) if (int'(v[i]) != r[i]) ok = 0;
    checks++;
    if (!ok) begin failures++; if (failures < 5) $display("FAIL: %s", s); end
  endtask

  initial begin
    vec_t r, iv;
    int ga, gb;
    repeat (2) @(negedge clk);
    rst_n = 1;
    r = zero_vec();
    cmp(beta, r, "reset");
    for (int t = 0; t < 600; t++) begin
      ga = int'($urandom_range(0, 127)) - 64;
      gb = int'($urandom_range(0, 63)) - 32;
      gamma.ga = gcomp_t'(ga); gamma.gb = gcomp_t'(gb);
      init = ($urandom_range(0, 15) == 0);
      for (int i = 0; i < NSTATE; i++) begin
        iv[i] = int'($urandom_range(0, 200)) - 100;
        init_val[i] = sm_t'(iv[i]);
      end
      en = 1;
      #1;
      if (init) r = iv;
      cmp(beta_cur, r, $sformatf("beta_cur stage %0d", t));
      @(negedge clk);
      r = bwd(r, ga, gb);
      cmp(beta, r, $sformatf("beta stage %0d", t));
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
