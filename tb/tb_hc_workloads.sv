// tb_hc_workloads: runs the smaller 3D+ codes of the thesis' performance
// survey through the whole link, one hc_link_tester per size: sides of 5,
// 7, 8, 10 and 12 information bits (6x6x7, 8x8x9, 9x9x10, 11x11x12 and
// 13x13x14 with parity). The 6x6x7 and 8x8x9 codes have even sides and so
// use the modified roll assignment; the others use plain diagonal parity.
// Each size runs antipodal, 8PSK and 16QAM blocks bit-exactly against the
// reference model. The full 17x17x18 code is covered by the top's own
// testbench. A sixth tester runs the four-dimensional 8x8x8x9 code (7^4
// information bits in a parity hyper-cube plus one roll cube). Two more run
// the pair of codes the thesis compares for shortening: the 6x6x6/7x7x8
// cube-plus-diagonal code (216 bits) and the 8x8x4/9x9x6 code, a 9x9x9 cube
// shortened to four information planes (256 bits), which is simply a box
// with a shorter depth. The testers run one after another.
module tb_hc_workloads;
  logic go [8];
  logic done [8];
  int   chk [8];
  int   fl [8];

  hc_link_tester #(.ROWS(6),  .COLS(6),  .PLANES(7),  .K_EXP(125),  .N_EXP(252),  .SEED(11)) t5  (.go(go[0]), .done(done[0]), .checks(chk[0]), .failures(fl[0]));
  hc_link_tester #(.ROWS(8),  .COLS(8),  .PLANES(9),  .K_EXP(343),  .N_EXP(576),  .SEED(12)) t7  (.go(go[1]), .done(done[1]), .checks(chk[1]), .failures(fl[1]));
  hc_link_tester #(.ROWS(9),  .COLS(9),  .PLANES(10), .K_EXP(512),  .N_EXP(810),  .SEED(13)) t8  (.go(go[2]), .done(done[2]), .checks(chk[2]), .failures(fl[2]));
  hc_link_tester #(.ROWS(11), .COLS(11), .PLANES(12), .K_EXP(1000), .N_EXP(1452), .SEED(14)) t10 (.go(go[3]), .done(done[3]), .checks(chk[3]), .failures(fl[3]));
  hc_link_tester #(.ROWS(13), .COLS(13), .PLANES(14), .K_EXP(1728), .N_EXP(2366), .SEED(15)) t12 (.go(go[4]), .done(done[4]), .checks(chk[4]), .failures(fl[4]));
  hc_link_tester #(.ROWS(8), .COLS(8), .PLANES(8), .CUBES(9), .K_EXP(2401), .N_EXP(4608), .SEED(16)) t4d (.go(go[5]), .done(done[5]), .checks(chk[5]), .failures(fl[5]));
  hc_link_tester #(.ROWS(7), .COLS(7), .PLANES(8), .K_EXP(216), .N_EXP(392), .SEED(17)) t6c (.go(go[6]), .done(done[6]), .checks(chk[6]), .failures(fl[6]));
  hc_link_tester #(.ROWS(9), .COLS(9), .PLANES(6), .K_EXP(256), .N_EXP(486), .SEED(18)) t8s (.go(go[7]), .done(done[7]), .checks(chk[7]), .failures(fl[7]));

  int checks = 0, failures = 0;

  initial begin
    foreach (go[i]) go[i] = 0;
    for (int i = 0; i < 8; i++) begin
      go[i] = 1;
      wait (done[i]);
      checks += chk[i];
      failures += fl[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
