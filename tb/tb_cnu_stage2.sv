// tb_cnu_stage2: random test of CNU stage 2, degree 6 at 6 bits and degree 7 at 5 bits.
// Expected per edge (min-sum rule written directly): magnitude = minimum of the other
// edges' magnitudes, sign = XOR of the other edges' signs; a 5-bit result is doubled
// (one zero fraction bit appended) to reach the 6-bit format.
module tb_cnu_stage2;
  int checks = 0, failures = 0;

  logic              sh [6];
  logic [4:0]        mh [6];
  logic signed [5:0] rh [6];
  logic              sl [7];
  logic [4:0]        ml [7];
  logic signed [5:0] rl [7];

  cnu_stage2 #(.DEG(6), .WV(6), .WC(6)) dut_h (.sgn(sh), .mag(mh), .r(rh));
  cnu_stage2 #(.DEG(7), .WV(6), .WC(5)) dut_l (.sgn(sl), .mag(ml), .r(rl));

  task automatic check(string nm, int deg, int s [], int m [], int r [], int scale);
    for (int i = 0; i < deg; i++) begin
      automatic int kap = 1000, neg = 0, e;
      for (int j = 0; j < deg; j++)
        if (j != i) begin
          if (m[j] < kap) kap = m[j];
          neg ^= s[j];
        end
      e = (neg ? -kap : kap) * scale;
      checks++;
      if (r[i] != e) begin
        failures++;
        if (failures < 10) $display("%s edge %0d: got %0d expected %0d", nm, i, r[i], e);
      end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      automatic int s6 [] = new[6];
      automatic int g6 [] = new[6];
      automatic int o6 [] = new[6];
      automatic int s7 [] = new[7];
      automatic int g7 [] = new[7];
      automatic int o7 [] = new[7];
      automatic bit tie = (t % 2 == 0);
      foreach (s6[i]) begin
        s6[i] = $urandom_range(1);
        g6[i] = tie ? $urandom_range(3) : $urandom_range(31);
        sh[i] = s6[i][0];
        mh[i] = 5'(g6[i]);
      end
      foreach (s7[i]) begin
        s7[i] = $urandom_range(1);
        g7[i] = tie ? $urandom_range(3) : $urandom_range(15);
        sl[i] = s7[i][0];
        ml[i] = 5'(g7[i]);
      end
      #1;
      foreach (o6[i]) o6[i] = int'(rh[i]);
      foreach (o7[i]) o7[i] = int'(rl[i]);
      check("high", 6, s6, g6, o6, 1);
      check("low", 7, s7, g7, o7, 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
