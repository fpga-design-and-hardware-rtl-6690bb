// cnn_ref_pkg: reference model of the saccade CNN for the testbenches.
//
// Plain integer arithmetic on Q8.8 values (int for data, longint for sums):
// every layer sums its products exactly, adds bias*256, divides by 256
// rounding toward minus infinity, saturates to 16 bits and applies ReLU where
// the network has one. Arrays are flat, in the same element order the
// processor uses to load the weight memories.
package cnn_ref_pkg;

  function automatic int sat16(input longint v);
    longint s;
    s = v >>> 8;
    if (s > 32767) return 32767;
    if (s < -32768) return -32768;
    return int'(s);
  endfunction

  // "same" 1-D convolution: x[c*L + t], w[(f*C + c)*K + k], y[f*L + t]
  function automatic void conv(input int C, input int K, input int NF, input int L,
                               input int x[], input int w[], input int b[],
                               output int y[], output int nclip);
    int pad;
    pad = (K - 1) / 2;
    y = new[NF * L];
    nclip = 0;
    for (int f = 0; f < NF; f++)
      for (int t = 0; t < L; t++) begin
        longint acc;
        int v;
        acc = longint'(b[f]) * 256;
        for (int c = 0; c < C; c++)
          for (int k = 0; k < K; k++) begin
            int p;
            p = t + k - pad;
            if (p >= 0 && p < L) acc += longint'(w[(f*C + c)*K + k]) * x[c*L + p];
          end
        v = sat16(acc);
        if (v < 0) begin v = 0; nclip++; end
        y[f*L + t] = v;
      end
  endfunction

  // pool 2: x[c*L + t] -> y[c*(L/2) + t]; nsecond counts pairs won by the odd element
  function automatic void pool(input int C, input int L, input int x[],
                               output int y[], output int nsecond);
    y = new[C * (L/2)];
    nsecond = 0;
    for (int c = 0; c < C; c++)
      for (int t = 0; t < L/2; t++) begin
        int a0, a1;
        a0 = x[c*L + 2*t]; a1 = x[c*L + 2*t + 1];
        y[c*(L/2) + t] = (a1 > a0) ? a1 : a0;
        if (a1 > a0) nsecond++;
      end
  endfunction

  // fully connected: w[i*NOUT + n]
  function automatic void fc(input int NIN, input int NOUT, input bit use_relu,
                             input int x[], input int w[], input int b[],
                             output int y[], output int nclip);
    y = new[NOUT];
    nclip = 0;
    for (int n = 0; n < NOUT; n++) begin
      longint acc;
      int v;
      acc = longint'(b[n]) * 256;
      for (int i = 0; i < NIN; i++) acc += longint'(w[i*NOUT + n]) * x[i];
      v = sat16(acc);
      if (use_relu && v < 0) begin v = 0; nclip++; end
      y[n] = v;
    end
  endfunction

  // floating-point softmax of Q8.8 scores, result scaled to 32768 = 1.0
  function automatic void softmax_real(input int N, input int z[], output real p[]);
    real m, s;
    p = new[N];
    m = real'(z[0]) / 256.0;
    for (int i = 1; i < N; i++) if (real'(z[i]) / 256.0 > m) m = real'(z[i]) / 256.0;
    s = 0.0;
    for (int i = 0; i < N; i++) begin
      p[i] = $exp(real'(z[i]) / 256.0 - m);
      s += p[i];
    end
    for (int i = 0; i < N; i++) p[i] = p[i] / s * 32768.0;
  endfunction

  function automatic int argmax(input int N, input int z[]);
    int k;
    k = 0;
    for (int i = 1; i < N; i++) if (z[i] > z[k]) k = i;
    return k;
  endfunction

  // One network with its data and everything the reference works out.
  typedef struct {
    int x[], w1[], b1[], w2[], b2[], w3[], b3[], w4[], b4[];
    int h[], z[];
    int cls;
    int clip1, clip2, clip3, odd1, odd2, sat1;
  } net_t;

  // random network with the published sizes; `big` makes saturation likely
  function automatic void make_net(ref net_t n, input int L, input int K1, input int NF1,
                                   input int K2, input int NF2, input int N3, input int N4,
                                   input bit big);
    n.x  = new[L];           foreach (n.x[i])  n.x[i]  = $urandom_range(0, 1024) - 512;
    n.w1 = new[NF1*K1];      foreach (n.w1[i]) n.w1[i] = $urandom_range(0, 200) - 100;
    n.b1 = new[NF1];         foreach (n.b1[i]) n.b1[i] = $urandom_range(0, 128) - 64;
    n.w2 = new[NF2*NF1*K2];  foreach (n.w2[i]) n.w2[i] = $urandom_range(0, 120) - 60;
    n.b2 = new[NF2];         foreach (n.b2[i]) n.b2[i] = $urandom_range(0, 128) - 64;
    n.w3 = new[NF2*(L/4)*N3]; foreach (n.w3[i]) n.w3[i] = $urandom_range(0, 60) - 30;
    n.b3 = new[N3];          foreach (n.b3[i]) n.b3[i] = $urandom_range(0, 128) - 64;
    n.w4 = new[N3*N4];       foreach (n.w4[i]) n.w4[i] = $urandom_range(0, 200) - 100;
    n.b4 = new[N4];          foreach (n.b4[i]) n.b4[i] = $urandom_range(0, 4000) - 2000;
    if (big) begin
      for (int i = 0; i < 10; i++) n.x[i] = 30000;
      for (int k = 0; k < K1; k++) n.w1[k] = 4000;
    end
  endfunction

  function automatic void eval_net(ref net_t n, input int L, input int K1, input int NF1,
                                   input int K2, input int NF2, input int N3, input int N4);
    int c1[], p1[], c2[], p2[], nc;
    conv(1, K1, NF1, L, n.x, n.w1, n.b1, c1, n.clip1);
    n.sat1 = 0;
    foreach (c1[i]) if (c1[i] == 32767) n.sat1++;
    pool(NF1, L, c1, p1, n.odd1);
    conv(NF1, K2, NF2, L/2, p1, n.w2, n.b2, c2, n.clip2);
    pool(NF2, L/2, c2, p2, n.odd2);
    fc(NF2*(L/4), N3, 1'b1, p2, n.w3, n.b3, n.h, n.clip3);
    fc(N3, N4, 1'b0, n.h, n.w4, n.b4, n.z, nc);
    n.cls = argmax(N4, n.z);
  endfunction

endpackage
