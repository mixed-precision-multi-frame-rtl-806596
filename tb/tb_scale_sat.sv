// tb_scale_sat: exhaustive test of the 0.75 scaling / rounding / saturation unit.
// Every 9-bit input is applied; the expected output is 0.75*x rounded to the nearest
// integer with halves rounded up, computed in real arithmetic, then clipped to +/-31.
module tb_scale_sat;
  int checks = 0, failures = 0;
  logic signed [8:0] x;
  logic signed [5:0] y;
  logic              sat;

  scale_sat #(.WI(9), .WO(6)) dut (.x(x), .y(y), .sat(sat));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -256; v < 256; v++) begin
      int  expv;
      bit  exps;
      x = 9'(v);
      #1;
      expv = int'($floor(0.75 * real'(v) + 0.5));
      exps = (expv > 31) || (expv < -31);
      if (expv > 31) expv = 31;
      if (expv < -31) expv = -31;
      checks++;
      if (int'(y) != expv || sat != exps) begin
        failures++;
        if (failures < 10) $display("x=%0d y=%0d sat=%0d expected %0d/%0d", v, y, sat, expv, exps);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
