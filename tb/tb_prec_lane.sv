// tb_prec_lane: one decoder at a given check-node precision, with its own frame source and
// checker; used by tb_precision_modes to compare the precision arrangements.
//
// The lane encodes random words, sends them through BPSK/AWGN at Eb/N0 = 1.5, 2.0 and
// 2.5 dB (NPER frames each), decodes them and checks every output frame against the
// behavioural model (bits, iteration count, converged flag). It accumulates frame errors
// and bit errors against the transmitted codewords, iterations and cycles per SNR point,
// and raises done when all frames are back.
module tb_prec_lane
  import ldpc_pkg::*;
  import ldpc_tb_pkg::*;
#(
  parameter prec_mode_e MODE = PREC_MIXED,
  parameter int         Z    = 48,
  parameter int         NPER = 4
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   frame_err [3],
  output int   bit_err   [3],
  output int   iters     [3]
);
  localparam int N  = BG_COLS * Z;
  localparam int NF = 3 * NPER;

  logic in_valid, in_ready, out_valid, out_converged;
  logic signed [WV-1:0] in_llr [N];
  logic [7:0] in_tag, out_tag;
  logic [N-1:0] out_bits;
  logic [ITER_W-1:0] out_iter;

  ldpc_mf_decoder #(.Z(Z), .MAX_ITER(32), .TAG_W(8), .PREC_MODE(MODE)) dut (.*);

  int llr_store [NF][];
  bit cw_store  [NF][];
  int n_out = 0;

  initial begin
    checks = 0; failures = 0; done = 0;
    for (int s = 0; s < 3; s++) begin frame_err[s] = 0; bit_err[s] = 0; iters[s] = 0; end
    for (int f = 0; f < NF; f++) begin
      automatic bit info [] = new[12 * Z];
      automatic bit cw [];
      foreach (info[i]) info[i] = 1'($urandom_range(1));
      encode(Z, info, cw);
      cw_store[f]  = cw;
      llr_store[f] = new[N];
      for (int i = 0; i < N; i++) llr_store[f][i] = channel_llr(cw[i], 1.5 + 0.5 * real'(f / NPER));
    end
  end

  initial begin
    automatic int f = 0;
    in_valid = 0;
    in_tag = 0;
    foreach (in_llr[i]) in_llr[i] = 0;
    @(posedge rst_n);
    while (f < NF) begin
      @(negedge clk);
      in_valid = 1;
      in_tag   = 8'(f);
      for (int i = 0; i < N; i++) in_llr[i] = 6'(llr_store[f][i]);
      @(posedge clk);
      if (in_ready) f++;
    end
    @(negedge clk);
    in_valid = 0;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      automatic int t = int'(out_tag);
      automatic int s = t / NPER;
      automatic bit hd [];
      automatic int it, be = 0;
      automatic bit cv, same = 1;
      ref_decode(Z, MODE, 32, llr_store[t], hd, it, cv);
      for (int i = 0; i < N; i++) begin
        if (out_bits[i] != hd[i]) same = 0;
        if (out_bits[i] != cw_store[t][i]) be++;
      end
      checks += 3;
      if (!same) failures++;
      if (int'(out_iter) != it) failures++;
      if (out_converged != cv) failures++;
      if (be != 0) frame_err[s]++;
      bit_err[s] += be;
      iters[s] += int'(out_iter);
      n_out++;
      if (n_out == NF) done = 1;
    end
  end
endmodule
