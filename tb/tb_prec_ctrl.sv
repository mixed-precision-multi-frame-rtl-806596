// tb_prec_ctrl: exhaustive test of the (5,1) -> (5,0) precision control unit.
// The 6-bit input x stands for x/2; the expected 5-bit output is x/2 rounded to the nearest
// integer with halves rounded up, clipped to +/-15.
module tb_prec_ctrl;
  int checks = 0, failures = 0;
  logic signed [5:0] x;
  logic signed [4:0] y;

  prec_ctrl #(.WI(6), .WO(5)) dut (.x(x), .y(y));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -32; v < 32; v++) begin
      int expv;
      x = 6'(v);
      #1;
      expv = int'($floor(real'(v) / 2.0 + 0.5));
      if (expv > 15) expv = 15;
      if (expv < -15) expv = -15;
      checks++;
      if (int'(y) != expv) begin
        failures++;
        $display("x=%0d y=%0d expected %0d", v, y, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
