// turbo_ref_pkg: behavioural reference models used by the testbenches.
//
// Written with plain integers, independently of the RTL structure:
//   ref_next / ref_par   the duo-binary component code (same equations as
//                        the RTL trellis, written from the encoder drawing)
//   ref_encode           component encoder over a couple sequence, start state 0
//   ref_arp              IEEE 802.16e CTC interleaver address P(j)
//   ref_gamma            branch metric of one branch
//   ref_map              windowed max-log-MAP over one sub-block with the same
//                        window schedule as the processing element (alpha from
//                        all-zero at step 0, each window's beta from all-zero
//                        at min((w+2)L, K)), giving the normalised extrinsic
//                        LLRs and the hard decisions
//   ref_turbo            whole iterative decoder, sub-block by sub-block
//   ref_make_block       random data, both encoders, noisy channel LLRs
package turbo_ref_pkg;

  typedef int int4_t [4];

  function automatic int ref_next(int s, int ab);
    int s1, s2, s3, a, b, fb;
    s1 = (s >> 2) & 1; s2 = (s >> 1) & 1; s3 = s & 1;
    a = (ab >> 1) & 1; b = ab & 1;
    fb = a ^ b ^ s1 ^ s3;
    return (fb << 2) | ((s1 ^ b) << 1) | (s2 ^ b);
  endfunction

  function automatic int ref_par(int s, int ab);
    int s1, s2, s3, a, b, fb;
    s1 = (s >> 2) & 1; s2 = (s >> 1) & 1; s3 = s & 1;
    a = (ab >> 1) & 1; b = ab & 1;
    fb = a ^ b ^ s1 ^ s3;
    return ((fb ^ s2 ^ s3) << 1) | (fb ^ s3);
  endfunction

  // couples in, parity pairs {y,w} out
  function automatic void ref_encode(input int ab [], output int yw []);
    int s;
    s = 0;
    yw = new[ab.size()];
    foreach (ab[i]) begin
      yw[i] = ref_par(s, ab[i]);
      s = ref_next(s, ab[i]);
    end
  endfunction

  function automatic int ref_arp(int j, int n, int p0, int p1, int p2, int p3);
    longint v;
    case (j % 4)
      0: v = longint'(p0) * j + 1;
      1: v = longint'(p0) * j + 1 + n / 2 + p1;
      2: v = longint'(p0) * j + 1 + p2;
      default: v = longint'(p0) * j + 1 + n / 2 + p3;
    endcase
    return int'(v % n);
  endfunction

  function automatic int ref_gamma(int la [4], int a, int b, int y, int w, int ab, int yw);
    int g;
    g = la[ab];
    if (ab & 2) g += a;
    if (ab & 1) g += b;
    if (yw & 2) g += y;
    if (yw & 1) g += w;
    return g;
  endfunction

  // ch[t] = {a, b, y, w}; la[t] = a priori per ab. Outputs ext[t][ab], dec[t].
  function automatic void ref_map(input int ch [][4], input int la [][4], input int k, input int l,
                                  output int ext [][4], output int dec []);
    int alpha [][8];
    int g [][16];
    ext = new[k];
    dec = new[k];
    alpha = new[k];
    g = new[k];
    for (int t = 0; t < k; t++)
      for (int ab = 0; ab < 4; ab++)
        for (int yw = 0; yw < 4; yw++)
          g[t][ab * 4 + yw] = ref_gamma(la[t], ch[t][0], ch[t][1], ch[t][2], ch[t][3], ab, yw);
    for (int s = 0; s < 8; s++) alpha[0][s] = 0;
    for (int t = 0; t + 1 < k; t++)
      for (int sp = 0; sp < 8; sp++) begin
        int best;
        best = -(1 << 30);
        for (int s = 0; s < 8; s++)
          for (int ab = 0; ab < 4; ab++)
            if (ref_next(s, ab) == sp) begin
              int v;
              v = alpha[t][s] + g[t][ab * 4 + ref_par(s, ab)];
              if (v > best) best = v;
            end
        alpha[t + 1][sp] = best;
      end
    for (int w = 0; w * l < k; w++) begin
      int beta [8];
      int top;
      top = ((w + 2) * l < k) ? (w + 2) * l : k;
      for (int s = 0; s < 8; s++) beta[s] = 0;
      for (int t = top - 1; t >= w * l; t--) begin
        int nb [8];
        if (t < (w + 1) * l) begin
          int lam [4], e [4], emax, lmax, d;
          for (int ab = 0; ab < 4; ab++) begin
            lam[ab] = -(1 << 30);
            for (int s = 0; s < 8; s++) begin
              int v;
              v = alpha[t][s] + g[t][ab * 4 + ref_par(s, ab)] + beta[ref_next(s, ab)];
              if (v > lam[ab]) lam[ab] = v;
            end
            e[ab] = lam[ab] - g[t][ab * 4];
          end
          emax = e[0]; lmax = lam[0]; d = 0;
          for (int ab = 1; ab < 4; ab++) begin
            if (e[ab] > emax) emax = e[ab];
            if (lam[ab] > lmax) begin lmax = lam[ab]; d = ab; end
          end
          for (int ab = 0; ab < 4; ab++) ext[t][ab] = (e[ab] - emax < -128) ? -128 : e[ab] - emax;
          dec[t] = d;
        end
        for (int s = 0; s < 8; s++) begin
          nb[s] = -(1 << 30);
          for (int ab = 0; ab < 4; ab++) begin
            int v;
            v = beta[ref_next(s, ab)] + g[t][ab * 4 + ref_par(s, ab)];
            if (v > nb[s]) nb[s] = v;
          end
        end
        beta = nb;
      end
    end
  endfunction

  function automatic int swap2(int ab);
    return ((ab & 1) << 1) | ((ab >> 1) & 1);
  endfunction

  // Whole turbo decoder: rec[i] = {A, B, Y1, W1, Y2, W2} of record i (Y2/W2 at
  // interleaved position i). Each half-iteration runs ref_map separately on
  // each of the npe sub-blocks, as the parallel hardware does. Outputs the
  // natural-order extrinsic LLRs after the last half and the decisions.
  function automatic void ref_turbo(input int rec [][6], input int n, input int npe, input int l,
                                    input int q0, input int q1, input int q2, input int q3,
                                    input int iters, output int ld [][4], output int dec []);
    int k;
    int li [][4];
    int inv [];
    k = n / npe;
    ld = new[n]; li = new[n]; dec = new[n]; inv = new[n];
    for (int j = 0; j < n; j++) inv[ref_arp(j, n, q0, q1, q2, q3)] = j;
    foreach (ld[i]) ld[i] = '{0, 0, 0, 0};
    for (int it = 0; it < iters; it++) begin
      for (int p = 0; p < npe; p++) begin
        int ch [][4];
        int la [][4];
        int ex [][4];
        int dd [];
        ch = new[k]; la = new[k];
        for (int s = 0; s < k; s++) begin
          ch[s] = '{rec[p * k + s][0], rec[p * k + s][1], rec[p * k + s][2], rec[p * k + s][3]};
          la[s] = ld[p * k + s];
        end
        ref_map(ch, la, k, l, ex, dd);
        for (int s = 0; s < k; s++) begin
          int i;
          i = p * k + s;
          li[inv[i]] = (i % 2 == 0) ? '{ex[s][0], ex[s][2], ex[s][1], ex[s][3]} : ex[s];
        end
      end
      for (int m = 0; m < npe; m++) begin
        int ch [][4];
        int la [][4];
        int ex [][4];
        int dd [];
        ch = new[k]; la = new[k];
        for (int s = 0; s < k; s++) begin
          int j, i;
          j = m * k + s;
          i = ref_arp(j, n, q0, q1, q2, q3);
          ch[s] = (i % 2 == 0) ? '{rec[i][1], rec[i][0], rec[j][4], rec[j][5]}
                               : '{rec[i][0], rec[i][1], rec[j][4], rec[j][5]};
          la[s] = li[j];
        end
        ref_map(ch, la, k, l, ex, dd);
        for (int s = 0; s < k; s++) begin
          int j, i;
          j = m * k + s;
          i = ref_arp(j, n, q0, q1, q2, q3);
          ld[i]  = (i % 2 == 0) ? '{ex[s][0], ex[s][2], ex[s][1], ex[s][3]} : ex[s];
          dec[i] = (i % 2 == 0) ? swap2(dd[s]) : dd[s];
        end
      end
    end
  endfunction

  // Random couples encoded by both component encoders and mapped to
  // channel LLRs +-amp with uniform noise in [-noise, noise], clamped to
  // 6 bits. u = transmitted couples, rec as for ref_turbo.
  function automatic void ref_make_block(input int n, input int q0, input int q1, input int q2,
                                         input int q3, input int amp, input int noise,
                                         output int u [], output int rec [][6]);
    int u2 [];
    int yw1 [];
    int yw2 [];
    u = new[n]; u2 = new[n]; rec = new[n];
    foreach (u[i]) u[i] = $urandom_range(0, 3);
    for (int j = 0; j < n; j++) begin
      int i;
      i = ref_arp(j, n, q0, q1, q2, q3);
      u2[j] = (i % 2 == 0) ? swap2(u[i]) : u[i];
    end
    ref_encode(u, yw1);
    ref_encode(u2, yw2);
    for (int i = 0; i < n; i++) begin
      int bits [6];
      bits = '{(u[i] >> 1) & 1, u[i] & 1, (yw1[i] >> 1) & 1, yw1[i] & 1, (yw2[i] >> 1) & 1, yw2[i] & 1};
      for (int b = 0; b < 6; b++) begin
        int v;
        v = (bits[b] ? amp : -amp) + $urandom_range(0, 2 * noise) - noise;
        rec[i][b] = v > 31 ? 31 : (v < -32 ? -32 : v);
      end
    end
  endfunction

endpackage
