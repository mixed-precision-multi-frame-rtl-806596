// tb_vnu: random test of the variable node unit for degrees 6, 3 and 2.
// Expected: P = L + sum(R), hd = (P < 0), Q_i = P - R_i, all in exact integer arithmetic.
module tb_vnu;
  int checks = 0, failures = 0;

  logic signed [5:0] l6, l3, l2;
  logic signed [5:0] r6 [6];
  logic signed [5:0] r3 [3];
  logic signed [5:0] r2 [2];
  logic signed [8:0] q6 [6];
  logic signed [8:0] q3 [3];
  logic signed [8:0] q2 [2];
  logic signed [8:0] p6, p3, p2;
  logic hd6, hd3, hd2;

  vnu #(.DEG(6)) dut6 (.l(l6), .r(r6), .q(q6), .p(p6), .hd(hd6));
  vnu #(.DEG(3)) dut3 (.l(l3), .r(r3), .q(q3), .p(p3), .hd(hd3));
  vnu #(.DEG(2)) dut2 (.l(l2), .r(r2), .q(q2), .p(p2), .hd(hd2));

  function automatic int rnd6(bit extreme);
    if (extreme) return ($urandom_range(1)) ? 31 : -32;
    return int'($urandom_range(63)) - 32;
  endfunction

  task automatic check(string nm, int deg, int l, int r [], int p, bit hd, int q []);
    automatic int ep = l;
    foreach (r[i]) ep += r[i];
    checks++;
    if (p != ep || hd != (ep < 0)) begin
      failures++;
      if (failures < 10) $display("%s: P=%0d hd=%0d expected %0d", nm, p, hd, ep);
    end
    for (int i = 0; i < deg; i++) begin
      checks++;
      if (q[i] != ep - r[i]) begin
        failures++;
        if (failures < 10) $display("%s: Q%0d=%0d expected %0d", nm, i, q[i], ep - r[i]);
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
      automatic bit ext = (t % 10 == 0);
      int vl6, vl3, vl2;
      automatic int v6 [] = new[6];
      automatic int v3 [] = new[3];
      automatic int v2 [] = new[2];
      automatic int o6 [] = new[6];
      automatic int o3 [] = new[3];
      automatic int o2 [] = new[2];
      vl6 = rnd6(ext); vl3 = rnd6(ext); vl2 = rnd6(ext);
      l6 = 6'(vl6); l3 = 6'(vl3); l2 = 6'(vl2);
      foreach (v6[i]) begin v6[i] = rnd6(ext); r6[i] = 6'(v6[i]); end
      foreach (v3[i]) begin v3[i] = rnd6(ext); r3[i] = 6'(v3[i]); end
      foreach (v2[i]) begin v2[i] = rnd6(ext); r2[i] = 6'(v2[i]); end
      #1;
      foreach (o6[i]) o6[i] = int'(q6[i]);
      foreach (o3[i]) o3[i] = int'(q3[i]);
      foreach (o2[i]) o2[i] = int'(q2[i]);
      check("D6", 6, vl6, v6, int'(p6), hd6, o6);
      check("D3", 3, vl3, v3, int'(p3), hd3, o3);
      check("D2", 2, vl2, v2, int'(p2), hd2, o2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
