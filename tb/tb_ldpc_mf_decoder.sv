// tb_ldpc_mf_decoder: end-to-end test of the decoder at its default size (1152-bit code,
// mixed precision, 32 iterations at most).
//
// Random information words are encoded, sent through BPSK/AWGN at Eb/N0 between 2.0 and
// 3.5 dB and quantized to 6-bit LLRs. Frame 0 is pure noise, so it never satisfies the
// parity checks and must be given up after the iteration limit while later frames overtake
// it. Input offers are withheld at random, so some slots run empty. For every frame that
// leaves the decoder the testbench checks, against a behavioural model of the same
// arithmetic (ldpc_tb_pkg::ref_decode): the decoded bits, the iteration count and the
// converged flag; the parity of a converged result; and the latency, 3 clocks per iteration
// (output after edge t + 3k - 1 for a frame taken at edge t). It also counts how often each
// mechanism happened (three frames in flight, empty slot, new frame loaded with cleared
// check messages, out-of-order exit, give-up at the iteration limit, scaler saturation) and
// counts a failure for any that never happened.
module tb_ldpc_mf_decoder;
  import ldpc_pkg::*;
  import ldpc_tb_pkg::*;

  localparam int Z        = 48;
  localparam int N        = BG_COLS * Z;
  localparam int MAXIT    = 32;
  localparam int NFRAMES  = 12;

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_converged;
  logic signed [WV-1:0] in_llr [N];
  logic [7:0] in_tag, out_tag;
  logic [N-1:0] out_bits;
  logic [ITER_W-1:0] out_iter;

  ldpc_mf_decoder dut (.*);

  always #5 clk = ~clk;

  int  llr_store [NFRAMES][];
  bit  cw_store  [NFRAMES][];
  longint load_cyc [NFRAMES];
  longint cyc = 0;
  int  n_out = 0, max_tag_out = -1;
  int  n_full = 0, n_empty_slot = 0, n_load = 0, n_ooo = 0, n_giveup = 0, n_sat = 0;
  int  n_match_tx = 0;
  int  iter_sum = 0;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("cycle %0d: FAIL %s", cyc, what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog: %0d of %0d frames out", n_out, NFRAMES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // frame preparation
  initial begin
    for (int f = 0; f < NFRAMES; f++) begin
      automatic bit info [] = new[12 * Z];
      automatic bit cw [];
      automatic real snr = 2.0 + 0.5 * real'(f % 4);
      foreach (info[i]) info[i] = $urandom_range(1);
      encode(Z, info, cw);
      chk(syndrome_wt(Z, cw) == 0, "encoder");
      cw_store[f]  = cw;
      llr_store[f] = new[N];
      for (int i = 0; i < N; i++)
        llr_store[f][i] = (f == 0) ? int'($urandom_range(62)) - 31 : channel_llr(cw[i], snr);
    end
  end

  // driver
  initial begin
    automatic int f = 0;
    in_valid = 0;
    in_tag = 0;
    foreach (in_llr[i]) in_llr[i] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    while (f < NFRAMES) begin
      @(negedge clk);
      // hold back the second frame for a while and offer the rest 70% of the time
      in_valid = (f != 1 || cyc > 20) && ($urandom_range(99) < 70);
      in_tag   = 8'(f);
      for (int i = 0; i < N; i++) in_llr[i] = 6'(llr_store[f][i]);
      @(posedge clk);
      if (in_valid && in_ready) begin
        load_cyc[f] = cyc;
        f++;
      end
    end
    @(negedge clk);
    in_valid = 0;
  end

  // cycle counter and mechanism monitors (sampled just before each edge)
  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.u_mem.a_valid && dut.u_mem.b_valid && !dut.u_mem.c_empty) n_full++;
      if (!dut.u_mem.a_valid && (dut.u_mem.b_valid || !dut.u_mem.c_empty)) n_empty_slot++;
      if (in_valid && in_ready) n_load++;
      if (dut.sat_any && dut.u_mem.b_valid) n_sat++;
    end
    cyc <= cyc + 1;
  end

  // output checker
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      automatic int  t = int'(out_tag);
      automatic bit  hd [];
      automatic int  it;
      automatic bit  cv;
      automatic bit  obits [] = new[N];
      automatic bit  same = 1, tx = 1;
      ref_decode(Z, PREC_MIXED, MAXIT, llr_store[t], hd, it, cv);
      for (int i = 0; i < N; i++) begin
        obits[i] = out_bits[i];
        if (obits[i] != hd[i]) same = 0;
        if (obits[i] != cw_store[t][i]) tx = 0;
      end
      chk(same, $sformatf("frame %0d bits differ from the model", t));
      chk(int'(out_iter) == it, $sformatf("frame %0d iterations %0d, model %0d", t, out_iter, it));
      chk(out_converged == cv, $sformatf("frame %0d converged flag", t));
      if (out_converged) chk(syndrome_wt(Z, obits) == 0, "converged output is a codeword");
      // out_valid was registered at edge cyc - 1; the frame was taken at edge load_cyc, so
      // cyc - 1 = load_cyc + 3k - 1
      chk(cyc == load_cyc[t] + 3 * longint'(out_iter),
          $sformatf("frame %0d latency %0d for %0d iterations", t, cyc - load_cyc[t], out_iter));
      if (t < max_tag_out) n_ooo++;
      if (t > max_tag_out) max_tag_out = t;
      if (!out_converged) n_giveup++;
      if (tx) n_match_tx++;
      iter_sum += int'(out_iter);
      $display("frame %0d out at cycle %0d: %0d iterations, converged %0d, equals sent codeword %0d",
               t, cyc, out_iter, out_converged, tx);
      n_out++;
      if (n_out == NFRAMES) begin
        $display("three frames in flight: %0d cycles, empty slot: %0d cycles, loads: %0d",
                 n_full, n_empty_slot, n_load);
        $display("out of order exits: %0d, give-ups: %0d, saturating cycles: %0d",
                 n_ooo, n_giveup, n_sat);
        $display("frames equal to the sent codeword: %0d of %0d, mean iterations %0.2f",
                 n_match_tx, NFRAMES, real'(iter_sum) / NFRAMES);
        chk(n_full > 0, "three frames in flight happened");
        chk(n_empty_slot > 0, "empty slot happened");
        chk(n_load == NFRAMES, "every frame loaded");
        chk(n_ooo > 0, "out-of-order exit happened");
        chk(n_giveup > 0, "give-up at the iteration limit happened");
        chk(n_sat > 0, "saturation happened");
        chk(n_match_tx >= NFRAMES / 2, "most noisy frames decoded to the sent codeword");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
endmodule
