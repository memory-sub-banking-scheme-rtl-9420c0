// tb_alpha_mem: alpha sub-banks. Writes and reads random words in different
// sub-banks in the same cycle, checks the read data against a model, checks
// the bypass (read of the word being written returns the new word one cycle
// later) and that a read and write of different words of one sub-bank is
// flagged as a conflict.
module tb_alpha_mem;
  import siso_pkg::*;
  localparam int NB = 3, D = 8;
  logic clk = 1'b0;
  logic rst_n = 1'b1;
  always #5 clk = ~clk;
  logic we = 0, re = 0, bypass, conflict;
  logic [1:0] wbank = '0, rbank = '0;
  logic [2:0] waddr = '0, raddr = '0;
  sm_vec_t wdata = '0, rdata;
  sm_vec_t model [NB][D];
  int checks = 0, failures = 0, n_byp = 0;

  alpha_mem #(.NB(NB), .DEPTH(D)) dut (.*);

  function automatic sm_vec_t rnd();
    sm_vec_t v;
    for (int s = 0; s < NS; s++) v[s] = sm_t'($urandom);
    return v;
  endfunction

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    @(negedge clk);
    for (int b = 0; b < NB; b++)
      for (int a = 0; a < D; a++) begin
        we = 1; wbank = 2'(b); waddr = 3'(a); wdata = rnd(); model[b][a] = wdata;
        @(negedge clk);
      end
    for (int r = 0; r < 300; r++) begin
      int rb, wb, ra, wa;
      rb = $urandom_range(0, NB-1);
      wb = $urandom_range(0, NB-1);
      ra = $urandom_range(0, D-1);
      wa = (wb == rb) ? ra : $urandom_range(0, D-1);
      we = 1; wbank = 2'(wb); waddr = 3'(wa); wdata = rnd();
      re = 1; rbank = 2'(rb); raddr = 3'(ra);
      #1;
      chk(!conflict, "conflict flagged");
      chk(bypass == (wb == rb), "bypass flag");
      if (bypass) n_byp++;
      @(negedge clk);
      model[wb][wa] = wdata;
      chk(rdata == model[rb][ra], $sformatf("read bank %0d addr %0d", rb, ra));
    end
    chk(n_byp > 0, "bypass never exercised");
    we = 1; re = 1; wbank = 2'd1; rbank = 2'd1; waddr = 3'd0; raddr = 3'd5;
    #1 chk(conflict && !bypass, "same-bank different-word access not flagged");
    we = 0; re = 0;
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
