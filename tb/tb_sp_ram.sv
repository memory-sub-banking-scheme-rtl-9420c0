// tb_sp_ram: one sub-bank. Fills it with random words, reads them back with
// the one-cycle read latency, checks that a cycle with both write and read
// enables performs only the write and that rdata holds between reads.
module tb_sp_ram;
  localparam int D = 32, W = 14;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic we = 0, re = 0;
  logic [4:0] addr = '0;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] model [D];
  int checks = 0, failures = 0;

  sp_ram #(.DEPTH(D), .WIDTH(W)) dut (.clk, .we, .re, .addr, .wdata, .rdata);

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    logic [W-1:0] held;
    @(negedge clk);
    for (int a = 0; a < D; a++) begin
      we = 1; addr = 5'(a); wdata = W'($urandom); model[a] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int r = 0; r < 100; r++) begin
      int a;
      a = $urandom_range(0, D - 1);
      re = 1; addr = 5'(a);
      @(negedge clk);
      chk(rdata == model[a], $sformatf("read %0d: %h, expected %h", a, rdata, model[a]));
    end
    // write with read enable: write only, output keeps the previous word
    held = rdata;
    we = 1; re = 1; addr = 5'd3; wdata = ~model[3]; model[3] = wdata;
    @(negedge clk);
    chk(rdata == held, "read performed during a write");
    we = 0; re = 0;
    repeat (3) @(negedge clk);
    chk(rdata == held, "rdata changed without a read");
    re = 1; addr = 5'd3;
    @(negedge clk);
    chk(rdata == model[3], "write during read-enable lost");
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
