// tb_parity_check: syndrome test at Z = 8 (192-bit code).
// Encoded codewords must give ok = 1 and an all-zero syndrome; random vectors and codewords
// with bit errors are compared with a syndrome computed from the base matrix here.
module tb_parity_check;
  import ldpc_pkg::*;
  import ldpc_tb_pkg::*;
  localparam int Z = 8;
  localparam int N = BG_COLS * Z;
  localparam int M = BG_ROWS * Z;
  int checks = 0, failures = 0;

  logic [N-1:0] hd;
  logic [M-1:0] syn;
  logic         ok;

  parity_check #(.Z(Z)) dut (.hd(hd), .syn(syn), .ok(ok));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      automatic bit info [] = new[12 * Z];
      bit cw [];
      automatic int nerr = (t % 3);              // 0: codeword, 1-2: that many bit errors
      if (t % 10 == 9) nerr = 50;      // nearly random vector
      foreach (info[i]) info[i] = $urandom_range(1);
      encode(Z, info, cw);
      if (t % 3 == 0) begin
        checks++;
        if (syndrome_wt(Z, cw) != 0) begin
          failures++;
          $display("encoder produced a non-codeword");
        end
      end
      for (int i = 0; i < nerr; i++) begin
        automatic int b = $urandom_range(N - 1);
        cw[b] = !cw[b];
      end
      for (int i = 0; i < N; i++) hd[i] = cw[i];
      #1;
      for (int r = 0; r < BG_ROWS; r++)
        for (int k = 0; k < Z; k++) begin
          automatic bit e = 0;
          for (int c = 0; c < BG_COLS; c++)
            if (BASE[r][c] >= 0) e ^= cw[c * Z + (k + (BASE[r][c] * Z) / 96) % Z];
          checks++;
          if (syn[r * Z + k] != e) begin
            failures++;
            if (failures < 10) $display("check %0d: got %0d expected %0d", r * Z + k, syn[r * Z + k], e);
          end
        end
      checks++;
      if (ok != (syndrome_wt(Z, cw) == 0)) begin
        failures++;
        $display("ok=%0d wrong", ok);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
