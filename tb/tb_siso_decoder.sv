// tb_siso_decoder: end-to-end test of the decoder at its default size
// (eta = 2, L = 32, N = 1024, 4 data and 3 alpha sub-banks): two frames,
// every soft output against the reference model, timing and schedule events.
module tb_siso_decoder;
  logic fin;
  int   checks, failures;

  siso_frame_test #(.FRAMES(2), .DEFAULT_DUT(1'b1)) u_test (.fin, .checks, .failures);

  initial begin
    #1;  // let the test clear its fin flag first
    wait (fin);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    #200000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
