// ldpc_tb_pkg: testbench helpers for the IEEE 802.16e rate-1/2 LDPC decoder.
//
//   encode        systematic encoder exploiting the dual-diagonal parity part of the base
//                 matrix: with lambda_r = sum over information columns of H_rc * s_c,
//                 p0 = sum_r lambda_r, p1 = lambda_0 + P^a p0 (a = shift of entry (0,12)),
//                 p_{i+1} = lambda_i + p_i (+ p0 for i = 5), i = 1..10.
//   syndrome_wt   number of unsatisfied parity checks of a bit vector.
//   channel_llr   BPSK over AWGN at a given Eb/N0 (rate 1/2), LLR = 2y/sigma^2 quantized to
//                 the decoder's signed 6-bit (5,1) format, i.e. round(2*LLR) clipped to +/-31.
//   ref_decode    behavioural model of the decoder's arithmetic: flooding normalized
//                 min-sum with 0.75 scaling, rounding and saturation as in the RTL and the
//                 same per-check precision; the check node rule is written directly as a
//                 minimum over all other edges, not as a min / sub-min search.
// The parity-check matrix is rebuilt here from ldpc_pkg::BASE alone.
package ldpc_tb_pkg;
  import ldpc_pkg::*;

  function automatic int shift_of(int r, int c, int z);
    return (BASE[r][c] * z) / Z0;
  endfunction

  function automatic int floor_div(int a, int b);
    return (a >= 0) ? a / b : -((-a + b - 1) / b);
  endfunction

  function automatic int clip(int v, int lim);
    return (v > lim) ? lim : ((v < -lim) ? -lim : v);
  endfunction

  function automatic void encode(int z, input bit info [], output bit cw []);
    bit lam [BG_ROWS][];
    bit par [BG_ROWS][];
    int a;
    cw = new[BG_COLS * z];
    for (int i = 0; i < 12 * z; i++) cw[i] = info[i];
    for (int r = 0; r < BG_ROWS; r++) begin
      lam[r] = new[z];
      par[r] = new[z];
      for (int k = 0; k < z; k++) begin
        bit b = 0;
        for (int c = 0; c < 12; c++)
          if (BASE[r][c] >= 0) b ^= info[c * z + (k + shift_of(r, c, z)) % z];
        lam[r][k] = b;
      end
    end
    for (int k = 0; k < z; k++) begin
      par[0][k] = 0;
      for (int r = 0; r < BG_ROWS; r++) par[0][k] ^= lam[r][k];
    end
    a = shift_of(0, 12, z);
    for (int k = 0; k < z; k++) par[1][k] = lam[0][k] ^ par[0][(k + a) % z];
    for (int i = 1; i <= 10; i++)
      for (int k = 0; k < z; k++)
        par[i+1][k] = lam[i][k] ^ par[i][k] ^ ((i == 5) ? par[0][k] : 1'b0);
    for (int i = 0; i < 12; i++)
      for (int k = 0; k < z; k++) cw[(12 + i) * z + k] = par[i][k];
  endfunction

  function automatic int syndrome_wt(int z, input bit x []);
    int w = 0;
    for (int r = 0; r < BG_ROWS; r++)
      for (int k = 0; k < z; k++) begin
        bit b = 0;
        for (int c = 0; c < BG_COLS; c++)
          if (BASE[r][c] >= 0) b ^= x[c * z + (k + shift_of(r, c, z)) % z];
        w += int'(b);
      end
    return w;
  endfunction

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967297.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  function automatic int channel_llr(bit b, real ebn0_db);
    real sigma2, y, l;
    sigma2 = 1.0 / (2.0 * 0.5 * (10.0 ** (ebn0_db / 10.0)));
    y = (b ? -1.0 : 1.0) + $sqrt(sigma2) * gauss();
    l = 2.0 * y / sigma2;
    return clip(int'($floor(2.0 * l + 0.5)), 31);
  endfunction

  function automatic void ref_decode(int z, prec_mode_e mode, int max_iter,
                                     input int llr [], output bit hd [],
                                     output int iters, output bit conv);
    int n = BG_COLS * z;
    int ev [$];               // variable of each edge
    int cs [$];               // first edge of each check
    int cd [$];               // degree of each check
    int rmsg [], q [], v [], p [];
    hd = new[n];
    for (int r = 0; r < BG_ROWS; r++)
      for (int k = 0; k < z; k++) begin
        cs.push_back(ev.size());
        for (int c = 0; c < BG_COLS; c++)
          if (BASE[r][c] >= 0) ev.push_back(c * z + (k + shift_of(r, c, z)) % z);
        cd.push_back(ev.size() - cs[cs.size() - 1]);
      end
    rmsg = new[ev.size()];
    q    = new[ev.size()];
    v    = new[ev.size()];
    p    = new[n];
    foreach (rmsg[e]) rmsg[e] = 0;
    for (int it = 1; it <= max_iter; it++) begin
      for (int i = 0; i < n; i++) p[i] = llr[i];
      foreach (ev[e]) p[ev[e]] += rmsg[e];
      for (int i = 0; i < n; i++) hd[i] = (p[i] < 0);
      foreach (ev[e]) q[e] = p[ev[e]] - rmsg[e];
      conv = (syndrome_wt(z, hd) == 0);
      iters = it;
      if (conv || it == max_iter) return;
      foreach (cs[m]) begin
        bit low = cnu_is_low(m, mode);
        for (int e = cs[m]; e < cs[m] + cd[m]; e++) begin
          v[e] = clip(floor_div(3 * q[e] + 2, 4), 31);
          if (low) v[e] = clip(floor_div(v[e] + 1, 2), 15);
        end
        for (int e = cs[m]; e < cs[m] + cd[m]; e++) begin
          int kap = 1000;
          bit neg = 0;
          for (int f = cs[m]; f < cs[m] + cd[m]; f++)
            if (f != e) begin
              int a = (v[f] < 0) ? -v[f] : v[f];
              if (a < kap) kap = a;
              neg ^= (v[f] < 0);
            end
          rmsg[e] = (neg ? -kap : kap) * (low ? 2 : 1);
        end
      end
    end
  endfunction
endpackage
