// tb_min_finder: random test of the min / sub-min / index finder for 6, 7 and 2 inputs.
// The reference sorts the inputs directly: min is the smallest value, sub the second
// smallest (equal to min on a tie), idx the first position holding the minimum.
module tb_min_finder;
  int checks = 0, failures = 0;

  logic [4:0] m6 [6];
  logic [4:0] m7 [7];
  logic [4:0] m2 [2];
  logic [4:0] mn6, sb6, mn7, sb7, mn2, sb2;
  logic [2:0] ix6, ix7;
  logic [0:0] ix2;

  min_finder #(.N(6), .WM(5)) dut6 (.mag(m6), .min(mn6), .sub(sb6), .idx(ix6));
  min_finder #(.N(7), .WM(5)) dut7 (.mag(m7), .min(mn7), .sub(sb7), .idx(ix7));
  min_finder #(.N(2), .WM(5)) dut2 (.mag(m2), .min(mn2), .sub(sb2), .idx(ix2));

  task automatic check(string nm, int n, int v [], int mn, int sb, int ix);
    automatic int emn = 99, esb = 99, eix = -1;
    for (int i = 0; i < n; i++)
      if (v[i] < emn) begin esb = emn; emn = v[i]; eix = i; end
      else if (v[i] < esb) esb = v[i];
    checks++;
    if (mn != emn || sb != esb || ix != eix) begin
      failures++;
      if (failures < 10)
        $display("%s: got %0d/%0d/%0d expected %0d/%0d/%0d", nm, mn, sb, ix, emn, esb, eix);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      automatic int v6 [] = new[6];
      automatic int v7 [] = new[7];
      automatic int v2 [] = new[2];
      // small ranges make ties frequent
      automatic int rng = (t % 2) ? 32 : 4;
      foreach (v6[i]) begin v6[i] = $urandom_range(rng - 1); m6[i] = 5'(v6[i]); end
      foreach (v7[i]) begin v7[i] = $urandom_range(rng - 1); m7[i] = 5'(v7[i]); end
      foreach (v2[i]) begin v2[i] = $urandom_range(rng - 1); m2[i] = 5'(v2[i]); end
      #1;
      check("N6", 6, v6, int'(mn6), int'(sb6), int'(ix6));
      check("N7", 7, v7, int'(mn7), int'(sb7), int'(ix7));
      check("N2", 2, v2, int'(mn2), int'(sb2), int'(ix2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
