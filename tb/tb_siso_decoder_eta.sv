// tb_siso_decoder_eta: the decoder in other sliding-window configurations
// eta = p/q = 1, 3/2, 3, 5/2, 4 and 5 (L = 32) and eta < 1: 2/3, 1/2, 1/3, 1/4
// and 1/10 (L = 30, 32 or 40), one frame each. For q > 1 the dummy recursion
// covers q blocks and reads all but the first back from the data sub-banks; for
// q > p several dummy units overlap in time. Frame lengths are chosen so that K
// is a multiple of p.
module tb_siso_decoder_eta;
  localparam int NT = 11;
  logic fin [NT];
  int   checks [NT], failures [NT];

  siso_frame_test #(.P(1), .Q(1), .L(32), .N(1024), .FRAMES(1)) u_e1  (.fin(fin[0]), .checks(checks[0]), .failures(failures[0]));
  siso_frame_test #(.P(3), .Q(2), .L(32), .N(768),  .FRAMES(1)) u_e15 (.fin(fin[1]), .checks(checks[1]), .failures(failures[1]));
  siso_frame_test #(.P(3), .Q(1), .L(32), .N(768),  .FRAMES(1)) u_e3  (.fin(fin[2]), .checks(checks[2]), .failures(failures[2]));
  siso_frame_test #(.P(5), .Q(2), .L(32), .N(800),  .FRAMES(1)) u_e25 (.fin(fin[3]), .checks(checks[3]), .failures(failures[3]));
  siso_frame_test #(.P(4), .Q(1), .L(32), .N(1024), .FRAMES(1)) u_e4  (.fin(fin[4]), .checks(checks[4]), .failures(failures[4]));
  siso_frame_test #(.P(5), .Q(1), .L(32), .N(960),  .FRAMES(1)) u_e5  (.fin(fin[5]), .checks(checks[5]), .failures(failures[5]));
  siso_frame_test #(.P(2), .Q(3),  .L(30), .N(300), .FRAMES(1)) u_e23 (.fin(fin[6]),  .checks(checks[6]),  .failures(failures[6]));
  siso_frame_test #(.P(1), .Q(2),  .L(32), .N(512), .FRAMES(1)) u_e12 (.fin(fin[7]),  .checks(checks[7]),  .failures(failures[7]));
  siso_frame_test #(.P(1), .Q(3),  .L(30), .N(300), .FRAMES(1)) u_e13 (.fin(fin[8]),  .checks(checks[8]),  .failures(failures[8]));
  siso_frame_test #(.P(1), .Q(4),  .L(32), .N(256), .FRAMES(1)) u_e14 (.fin(fin[9]),  .checks(checks[9]),  .failures(failures[9]));
  siso_frame_test #(.P(1), .Q(10), .L(40), .N(160), .FRAMES(1)) u_e110(.fin(fin[10]), .checks(checks[10]), .failures(failures[10]));

  int c, f;
  initial begin
    #1;  // let every test clear its fin flag first
    foreach (fin[i]) wait (fin[i]);
    c = 0; f = 0;
    foreach (fin[i]) begin c += checks[i]; f += failures[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end

  initial begin
    #200000;
    c = 0; f = 1;
    foreach (fin[i]) begin c += checks[i]; f += failures[i]; end
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end
endmodule
