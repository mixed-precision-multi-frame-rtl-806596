// tb_cnu_stage1: random test of CNU stage 1 at high (6-bit) and low (5-bit) precision.
// Expected per edge: s = round-half-up(0.75*q) clipped to +/-31 (saturation flag set when
// clipped); at low precision s' = round-half-up(s/2) clipped to +/-15; then sign = (s' < 0)
// and magnitude = |s'|.
module tb_cnu_stage1;
  import ldpc_tb_pkg::*;
  int checks = 0, failures = 0;

  logic signed [8:0] qh [7];
  logic signed [8:0] ql [7];
  logic              sh [7];
  logic              sl [7];
  logic [4:0]        mh [7];
  logic [4:0]        ml [7];
  logic [6:0]        th, tl;

  cnu_stage1 #(.DEG(7), .WS(9), .WV(6), .WC(6)) dut_h (.q(qh), .sgn(sh), .mag(mh), .sat(th));
  cnu_stage1 #(.DEG(7), .WS(9), .WV(6), .WC(5)) dut_l (.q(ql), .sgn(sl), .mag(ml), .sat(tl));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1500; t++) begin
      int vh [7], vl [7];
      automatic int rng = (t % 3 == 0) ? 256 : 48;
      for (int i = 0; i < 7; i++) begin
        vh[i] = int'($urandom_range(2 * rng - 1)) - rng;
        vl[i] = int'($urandom_range(2 * rng - 1)) - rng;
        qh[i] = 9'(vh[i]);
        ql[i] = 9'(vl[i]);
      end
      #1;
      for (int i = 0; i < 7; i++) begin
        automatic int s  = int'($floor(0.75 * real'(vh[i]) + 0.5));
        automatic bit st = (s > 31) || (s < -31);
        automatic int sc = clip(s, 31);
        int s2, sc2;
        checks++;
        if (sh[i] != (sc < 0) || int'(mh[i]) != ((sc < 0) ? -sc : sc) || th[i] != st) begin
          failures++;
          if (failures < 10) $display("high q=%0d got %0d/%0d/%0d", vh[i], sh[i], mh[i], th[i]);
        end
        s2  = clip(int'($floor(0.75 * real'(vl[i]) + 0.5)), 31);
        sc2 = clip(int'($floor(real'(s2) / 2.0 + 0.5)), 15);
        checks++;
        if (sl[i] != (sc2 < 0) || int'(ml[i]) != ((sc2 < 0) ? -sc2 : sc2)) begin
          failures++;
          if (failures < 10) $display("low q=%0d got %0d/%0d", vl[i], sl[i], ml[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
