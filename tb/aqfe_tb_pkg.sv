// aqfe_tb_pkg: reference model of the AQFE used by the testbenches.
//
// plcwt_model holds one wavelet bank (border entries and reduction
// coefficients, as loaded into the SpW0/SpW1 RAMs) and computes, from a
// 3N-sample window, the bit-exact output the hardware must produce:
//   x1h[n]  = x1h[n-1] + x[n-1] + x[n]            (2*X1)
//   acc4[n] = acc4[n-1] + x1h[n-1] + x1h[n]       (4*X2)
//   x2w[n]  = sat24(acc4[n] >>> 1)                (Integ RAM word)
//   S[tau]  = trunc32(psiJ*x1h[aJ+tau] >>> s1) - trunc32(psi1*x1h[a1+tau] >>> s1)
//           + sum_k trunc32(b_k*(x2w[a_k+tau] +/- x2w[a1+aJ-a_k+tau]) >>> s2)
// with 32-bit wrap-around. It also builds a real Morlet wavelet bank with a
// piecewise-linear approximation, and computes the exact (floating point)
// convolution sum_i x[i+tau] psi[i] to judge the approximation, and the
// piecewise-linear transform in floating point to judge the fixed point.
package aqfe_tb_pkg;

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  class plcwt_model;
    int n_pts, n_wav, kmax, bw, idx_w;
    int s1, s2;
    // SpW0: per wavelet [0] = start (a_1), [1] = end (a_J)
    int b0_idx[][2];
    int b0_val[][2];
    bit b0_ctl[][2];
    // SpW1: per wavelet kmax entries
    int b1_idx[][];
    int b1_val[][];
    bit b1_sub[][];
    // real wavelets, for the floating point reference, and the unquantised
    // border values and coefficients of the last morlet_bank()
    real psi[][];
    real b0_real[][2];
    real b1_real[][];

    function new(int n, int w, int jmax, int b);
      n_pts = n; n_wav = w; kmax = jmax / 2; bw = b;
      idx_w = $clog2(3 * n);
      b0_idx = new[w]; b0_val = new[w]; b0_ctl = new[w];
      b1_idx = new[w]; b1_val = new[w]; b1_sub = new[w];
      psi    = new[w]; b0_real = new[w]; b1_real = new[w];
      foreach (b1_idx[i]) begin
        b1_idx[i] = new[kmax]; b1_val[i] = new[kmax]; b1_sub[i] = new[kmax];
        b1_real[i] = new[kmax];
        psi[i] = new[2 * n + 1];
      end
    endfunction

    function int rnd_coef();
      int lim;
      lim = 1 << (bw - 1);
      return int'($urandom_range(0, 2 * lim - 1)) - lim;
    endfunction

    // random bank: borders a_1 < a_J <= 2N, points inside, random signs/ops
    function void random_bank();
      for (int w = 0; w < n_wav; w++) begin
        int a1, aj;
        a1 = int'($urandom_range(0, n_pts));
        aj = a1 + 1 + int'($urandom_range(0, 2 * n_pts - a1 - 1));
        b0_idx[w][0] = a1; b0_idx[w][1] = aj;
        b0_val[w][0] = rnd_coef(); b0_val[w][1] = rnd_coef();
        b0_ctl[w][0] = ($urandom_range(0, 7) != 0);
        b0_ctl[w][1] = ($urandom_range(0, 7) != 0);
        for (int k = 0; k < kmax; k++) begin
          b1_idx[w][k] = a1 + int'($urandom_range(0, aj - a1));
          b1_val[w][k] = rnd_coef();
          b1_sub[w][k] = $urandom_range(0, 1) != 0;
        end
      end
    endfunction

    // Real Morlet wavelets at frequencies f[w] (Hz) sampled at fs, centred at
    // window index N, support +-3 sigma (clipped to +-N), approximated by a
    // piecewise linear function over j points placed symmetrically and as
    // evenly as integer positions allow. For that symmetric wavelet the
    // coefficients b_i = m_i - m_(i-1) (slope steps) are symmetric, so each
    // pair uses addition; a centre point pairs with itself and gets b/2.
    // Coefficients are scaled by 2^fb_b, border values by 2^fb_p.
    function void morlet_bank(real fs, real f[], int j, int fb_p, int fb_b);
      real pi2;
      pi2 = 6.283185307179586;
      for (int w = 0; w < n_wav; w++) begin
        real sig, h_r;
        int h, c, npt, pts[$];

        real slope[$];
        c = n_pts;
        sig = 5.0 / (pi2 * f[w]);
        if (sig > 0.1 / 3.0) sig = 0.1 / 3.0;
        h_r = 3.0 * sig * fs;
        h = int'(h_r);
        if (h > n_pts) h = n_pts;
        if (h < 1) h = 1;
        for (int i = 0; i <= 2 * n_pts; i++) begin
          real t;
          t = real'(i - c) / fs;
          psi[w][i] = (i >= c - h && i <= c + h) ?
                      $cos(pi2 * f[w] * t) * $exp(-t * t / (2.0 * sig * sig)) : 0.0;
        end
        // subdivision points
        // Points: the two ends, then the local extrema of psi by decreasing
        // magnitude (the centre alone, the others in mirrored pairs), then
        // the midpoints between those, until 2*(j/2)-1 points are placed
        // (a centre point pairs with itself, so j/2 entries hold them).
        begin
          int budget, cand[$], taken[$];
          bit used[];
          used = new[2 * n_pts + 1];
          budget = 2 * (j / 2) - 1;
          if (budget < 2) budget = 2;
          used[c - h] = 1; used[c + h] = 1;
          taken.push_back(c - h); taken.push_back(c + h);
          cand.delete();
          for (int i = c; i < c + h; i++)
            if (rabs(psi[w][i]) >= rabs(psi[w][i-1]) && rabs(psi[w][i]) >= rabs(psi[w][i+1]))
              cand.push_back(i);
          cand.sort() with (rabs(psi[w][item]) * -1.0);
          for (int pass = 0; pass < 2; pass++) begin
            foreach (cand[q]) begin
              int p, need;
              p = cand[q];
              need = (p == c) ? 1 : 2;
              if (!used[p] && taken.size() + need <= budget) begin
                used[p] = 1; used[2 * c - p] = 1;
                taken.push_back(p);
                if (p != c) taken.push_back(2 * c - p);
              end
            end
            // second pass: midpoints between the chosen points of the right half
            begin
              int srt[$];
              srt = taken.find(x) with (x >= c);
              srt.sort();
              cand.delete();
              for (int q = 0; q + 1 < srt.size(); q++)
                if (srt[q+1] - srt[q] > 1) cand.push_back((srt[q] + srt[q+1]) / 2);
              if (srt.size() > 0 && srt[0] > c) cand.push_front(c);
            end
          end
          taken.sort();
          pts = taken;
          npt = pts.size();
        end
        b0_idx[w][0] = pts[0];       b0_idx[w][1] = pts[npt-1];
        b0_val[w][0] = int'(psi[w][pts[0]] * real'(1 << fb_p));
        b0_val[w][1] = int'(psi[w][pts[npt-1]] * real'(1 << fb_p));
        b0_ctl[w][0] = 1'b1;          b0_ctl[w][1] = 1'b1;
        b0_real[w][0] = psi[w][pts[0]]; b0_real[w][1] = psi[w][pts[npt-1]];
        slope.delete();
        for (int i = 0; i < npt - 1; i++)
          slope.push_back((psi[w][pts[i+1]] - psi[w][pts[i]]) / real'(pts[i+1] - pts[i]));
        for (int k = 0; k < kmax; k++) begin
          b1_idx[w][k] = c; b1_val[w][k] = 0; b1_sub[w][k] = 1'b0; b1_real[w][k] = 0.0;
        end
        for (int i = 0; i < (npt + 1) / 2 && i < kmax; i++) begin
          real mprev, mnext, bi;
          mprev = (i == 0) ? 0.0 : slope[i-1];
          mnext = (i == npt - 1) ? 0.0 : slope[i];
          bi = mnext - mprev;
          if (pts[i] == pts[npt - 1 - i]) bi = bi / 2.0;
          b1_idx[w][i] = pts[i];
          b1_val[w][i] = int'(bi * real'(1 << fb_b));
          b1_real[w][i] = bi;
          b1_sub[w][i] = 1'b0;
        end
      end
    endfunction

    function logic [63:0] entry0(int w, int side);
      return (64'(b0_ctl[w][side]) << (bw + idx_w)) |
             ((64'(b0_idx[w][side]) & ((64'd1 << idx_w) - 1)) << bw) |
             (64'(b0_val[w][side]) & ((64'd1 << bw) - 1));
    endfunction

    function logic [63:0] entry1(int w, int k);
      return (64'(b1_sub[w][k]) << (bw + idx_w)) |
             ((64'(b1_idx[w][k]) & ((64'd1 << idx_w) - 1)) << bw) |
             (64'(b1_val[w][k]) & ((64'd1 << bw) - 1));
    endfunction

    static function int sat24(longint v);
      if (v > 64'sd8388607)  return 8388607;
      if (v < -64'sd8388608) return -8388608;
      return int'(v);
    endfunction

    // bit-exact expected output; s[w*N + tau]
    function void compute(input int x[], input int k_used, output int s[]);
      longint x1h[], acc4[];
      int x2w[];
      int len;
      len = 3 * n_pts;
      x1h = new[len]; acc4 = new[len]; x2w = new[len];
      x1h[0] = 0; acc4[0] = 0;
      for (int n = 1; n < len; n++) begin
        x1h[n]  = x1h[n-1] + x[n-1] + x[n];
        acc4[n] = acc4[n-1] + x1h[n-1] + x1h[n];
      end
      for (int n = 0; n < len; n++) x2w[n] = sat24(acc4[n] >>> 1);
      s = new[n_wav * n_pts];
      for (int w = 0; w < n_wav; w++) begin
        int a1, aj;
        a1 = b0_idx[w][0]; aj = b0_idx[w][1];
        for (int tau = 0; tau < n_pts; tau++) begin
          int acc;
          longint p;
          acc = 0;
          if (b0_ctl[w][1]) begin
            p = longint'(b0_val[w][1]) * x1h[aj + tau];
            acc += int'(p >>> s1);
          end
          if (b0_ctl[w][0]) begin
            p = longint'(b0_val[w][0]) * x1h[a1 + tau];
            acc -= int'(p >>> s1);
          end
          for (int k = 0; k < k_used; k++) begin
            int a, m;
            longint pair;
            a = b1_idx[w][k];
            m = (a1 + aj - a) & ((1 << idx_w) - 1);
            pair = b1_sub[w][k] ? longint'(x2w[a + tau]) - x2w[m + tau]
                                : longint'(x2w[a + tau]) + x2w[m + tau];
            p = pair * b1_val[w][k];
            acc += int'(p >>> s2);
          end
          s[w * n_pts + tau] = acc;
        end
      end
    endfunction

    // the same piecewise-linear transform in floating point, with the
    // unquantised values of the last morlet_bank(): what the fixed-point
    // hardware approximates at a given J (scale 2 of x1h/x2w removed)
    function void plcwt_real(input int x[], input int k_used, output real s[]);
      real x1[], x2[];
      int len;
      len = 3 * n_pts;
      x1 = new[len]; x2 = new[len];
      x1[0] = 0.0; x2[0] = 0.0;
      for (int n = 1; n < len; n++) begin
        x1[n] = x1[n-1] + 0.5 * real'(x[n-1] + x[n]);
        x2[n] = x2[n-1] + 0.5 * (x1[n-1] + x1[n]);
      end
      s = new[n_wav * n_pts];
      for (int w = 0; w < n_wav; w++) begin
        int a1, aj;
        a1 = b0_idx[w][0]; aj = b0_idx[w][1];
        for (int tau = 0; tau < n_pts; tau++) begin
          real acc;
          acc = b0_real[w][1] * x1[aj + tau] - b0_real[w][0] * x1[a1 + tau];
          for (int k = 0; k < k_used; k++) begin
            int a, mr;
            a = b1_idx[w][k];
            mr = a1 + aj - a;
            acc += b1_real[w][k] * (b1_sub[w][k] ? x2[a + tau] - x2[mr + tau]
                                                 : x2[a + tau] + x2[mr + tau]);
          end
          s[w * n_pts + tau] = acc;
        end
      end
    endfunction

    // exact convolution with the real wavelet: sum_i x[i+tau] psi[i]
    function void exact(input int x[], output real s[]);
      s = new[n_wav * n_pts];
      for (int w = 0; w < n_wav; w++)
        for (int tau = 0; tau < n_pts; tau++) begin
          real a;
          a = 0.0;
          for (int i = 0; i <= 2 * n_pts; i++) a += real'(x[i + tau]) * psi[w][i];
          s[w * n_pts + tau] = a;
        end
    endfunction
  endclass

  // Pearson correlation coefficient
  function automatic real pearson(real a[], real b[]);
    real ma, mb, sab, saa, sbb;
    ma = 0; mb = 0; sab = 0; saa = 0; sbb = 0;
    foreach (a[i]) begin ma += a[i]; mb += b[i]; end
    ma /= a.size(); mb /= b.size();
    foreach (a[i]) begin
      sab += (a[i] - ma) * (b[i] - mb);
      saa += (a[i] - ma) * (a[i] - ma);
      sbb += (b[i] - mb) * (b[i] - mb);
    end
    if (saa == 0.0 || sbb == 0.0) return 0.0;
    return sab / $sqrt(saa * sbb);
  endfunction

endpackage
