// tb_llr_unit: soft-output unit. Presents random alpha, beta and branch
// metrics, and checks the registered LLR, extrinsic value and index one cycle
// later against the reference; also that out_valid follows in_valid.
module tb_llr_unit;
  import siso_pkg::*;
  import siso_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 0, in_valid = 0, out_valid;
  logic [9:0] in_idx = '0, out_idx;
  sm_vec_t alpha = '0, beta = '0;
  bm_word_t gamma = '0;
  llr_t out_llr, out_ext;
  int checks = 0, failures = 0;

  llr_unit #(.IDX_W(10)) dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 5) $display("FAIL: %s", s); end
  endtask

  initial begin
    vec_t a, b;
    int ga, gb, e;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < NSTATE; i++) begin
        a[i] = int'($urandom_range(0, 600)) - 300;
        b[i] = int'($urandom_range(0, 600)) - 300;
        alpha[i] = sm_t'(a[i]); beta[i] = sm_t'(b[i]);
      end
      ga = int'($urandom_range(0, 127)) - 64;
      gb = int'($urandom_range(0, 63)) - 32;
      gamma.ga = gcomp_t'(ga); gamma.gb = gcomp_t'(gb);
      in_valid = ($urandom_range(0, 3) != 0);
      in_idx = 10'(t);
      @(negedge clk);
      chk(out_valid == in_valid, "out_valid");
      if (in_valid) begin
        e = llr(a, b, ga, gb);
        chk(int'(out_llr) == e, $sformatf("LLR %0d, expected %0d", out_llr, e));
        chk(int'(out_ext) == e - ga, $sformatf("extrinsic %0d, expected %0d", out_ext, e - ga));
        chk(out_idx == 10'(t), "index");
      end
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
