// tb_precision_modes: the precision comparison workload, on the 192-bit code (Z = 8) of the
// same base matrix so that three decoders build and run in a few minutes.
//
// Three decoders, one with all check nodes at (5,1), one with all at (5,0) and one with the
// 1:1 mix, each decode their own random frames at Eb/N0 = 1.5, 2.0 and 2.5 dB. Every frame
// is checked against the behavioural model of its precision arrangement; the testbench then
// prints frame and bit error counts and mean iterations per SNR point. With a handful of
// frames per point and a short code the error counts only indicate a trend.
module tb_precision_modes;
  import ldpc_pkg::*;
  localparam int Z    = 8;
  localparam int NPER = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic done [3];
  int   chk [3], fail [3];
  int   fe [3][3], be [3][3], it [3][3];
  int   checks = 0, failures = 0;

  tb_prec_lane #(.MODE(PREC_HIGH),  .Z(Z), .NPER(NPER)) lane_hi  (.clk, .rst_n, .done(done[0]), .checks(chk[0]),
    .failures(fail[0]), .frame_err(fe[0]), .bit_err(be[0]), .iters(it[0]));
  tb_prec_lane #(.MODE(PREC_LOW),   .Z(Z), .NPER(NPER)) lane_lo  (.clk, .rst_n, .done(done[1]), .checks(chk[1]),
    .failures(fail[1]), .frame_err(fe[1]), .bit_err(be[1]), .iters(it[1]));
  tb_prec_lane #(.MODE(PREC_MIXED), .Z(Z), .NPER(NPER)) lane_mix (.clk, .rst_n, .done(done[2]), .checks(chk[2]),
    .failures(fail[2]), .frame_err(fe[2]), .bit_err(be[2]), .iters(it[2]));

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    static string nm [3] = '{"(5,1)", "(5,0)", "mixed"};
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    wait (done[0] && done[1] && done[2]);
    for (int l = 0; l < 3; l++) begin
      checks += chk[l];
      failures += fail[l];
      for (int s = 0; s < 3; s++)
        $display("%s  Eb/N0 %0.1f dB: frame errors %0d/%0d, bit errors %0d, mean iterations %0.1f",
                 nm[l], 1.5 + 0.5 * s, fe[l][s], NPER, be[l][s], real'(it[l][s]) / NPER);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
