// tb_data_mem: data sub-banks. Fills every sub-bank through the write port,
// then reads through the three read ports at once, each from a different
// sub-bank, while the write port fills a fourth, and compares with a model.
// Also checks that two ports on one sub-bank raise `conflict`.
module tb_data_mem;
  import siso_pkg::*;
  localparam int NB = 4, D = 8;
  logic clk = 1'b0;
  logic rst_n = 1'b1;
  always #5 clk = ~clk;
  logic we = 0, a_re = 0, b_re = 0, conflict;
  logic d_re [1] = '{1'b0};
  logic [1:0] wbank = '0, a_bank = '0, b_bank = '0;
  logic [1:0] d_bank [1] = '{2'd0};
  logic [2:0] waddr = '0, a_addr = '0, b_addr = '0;
  logic [2:0] d_addr [1] = '{3'd0};
  bm_word_t wdata = '0, a_rdata, b_rdata;
  bm_word_t d_rdata [1];
  bm_word_t model [NB][D];
  int checks = 0, failures = 0;

  data_mem #(.NB(NB), .DEPTH(D)) dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    @(negedge clk);
    for (int b = 0; b < NB; b++)
      for (int a = 0; a < D; a++) begin
        we = 1; wbank = 2'(b); waddr = 3'(a); wdata = bm_word_t'($urandom);
        model[b][a] = wdata;
        @(negedge clk);
      end
    we = 0;
    for (int r = 0; r < 200; r++) begin
      int perm [4], ea, eb, ed, xa, xb, xd;
      perm = '{0, 1, 2, 3};
      perm.shuffle();
      a_re = 1; b_re = 1; d_re[0] = 1; we = 1;
      a_bank = 2'(perm[0]); b_bank = 2'(perm[1]); d_bank[0] = 2'(perm[2]); wbank = 2'(perm[3]);
      xa = $urandom_range(0, D-1); xb = $urandom_range(0, D-1); xd = $urandom_range(0, D-1);
      a_addr = 3'(xa); b_addr = 3'(xb); d_addr[0] = 3'(xd);
      waddr = 3'($urandom_range(0, D-1)); wdata = bm_word_t'($urandom);
      #1 chk(!conflict, "conflict with four distinct sub-banks");
      @(negedge clk);
      model[perm[3]][waddr] = wdata;
      chk(a_rdata == model[perm[0]][xa], "alpha port data");
      chk(b_rdata == model[perm[1]][xb], "beta port data");
      chk(d_rdata[0] == model[perm[2]][xd], "dummy port data");
    end
    a_re = 1; b_re = 1; d_re[0] = 0; we = 0; a_bank = 2'd1; b_bank = 2'd1;
    #1 chk(conflict, "two reads of one sub-bank not flagged");
    a_re = 0; b_re = 0; we = 1; wbank = 2'd2; d_re[0] = 1; d_bank[0] = 2'd2;
    #1 chk(conflict, "read and write of one sub-bank not flagged");
    we = 0; d_re[0] = 0;
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
