// nn_ref_pkg: behavioural reference of the network layers for the
// testbenches. Plain integer arithmetic on flat arrays, independent of the
// RTL structure (no pipelines, no time multiplexing). Formats follow
// nn_pkg: 16-bit values with 8 fractional bits, products summed exactly,
// then shifted right by 8 (towards minus infinity), saturated and, if
// requested, clipped at zero. Maps are flat in height, width, channel order.
package nn_ref_pkg;

  int unsigned n_relu_clamps;   // results that ReLU set to zero
  int unsigned n_saturations;   // results that saturated

  function automatic int requant(longint acc, bit relu);
    longint s;
    s = acc >>> 8;
    if (s > 32767)       begin s = 32767;  n_saturations++; end
    else if (s < -32768) begin s = -32768; n_saturations++; end
    if (relu && s < 0) begin s = 0; n_relu_clamps++; end
    return int'(s);
  endfunction

  // Convolution, valid padding, stride 1. wt[f*T + (ky*K+kx)*CIN + c].
  function automatic void conv(input int img[], input int wt[], input int b[],
                               input int H, input int W, input int CIN,
                               input int K, input int F, input bit relu,
                               output int y[]);
    int HO, WO, T;
    HO = H - K + 1; WO = W - K + 1; T = K*K*CIN;
    y = new[HO*WO*F];
    for (int oy = 0; oy < HO; oy++)
      for (int ox = 0; ox < WO; ox++)
        for (int f = 0; f < F; f++) begin
          longint acc;
          acc = longint'(b[f]) * 256;
          for (int ky = 0; ky < K; ky++)
            for (int kx = 0; kx < K; kx++)
              for (int c = 0; c < CIN; c++)
                acc += longint'(img[((oy+ky)*W + ox+kx)*CIN + c])
                     * longint'(wt[f*T + (ky*K+kx)*CIN + c]);
          y[(oy*WO + ox)*F + f] = requant(acc, relu);
        end
  endfunction

  function automatic void pool(input int x[], input int H, input int W,
                               input int F, input int P, output int y[]);
    int HP, WP;
    HP = H / P; WP = W / P;
    y = new[HP*WP*F];
    for (int py = 0; py < HP; py++)
      for (int px = 0; px < WP; px++)
        for (int f = 0; f < F; f++) begin
          int m;
          m = -100000;
          for (int dy = 0; dy < P; dy++)
            for (int dx = 0; dx < P; dx++)
              if (x[((py*P+dy)*W + px*P+dx)*F + f] > m)
                m = x[((py*P+dy)*W + px*P+dx)*F + f];
          y[(py*WP + px)*F + f] = m;
        end
  endfunction

  // Dense layer. wt[n*NI + i].
  function automatic void dense(input int x[], input int wt[], input int b[],
                                input int NI, input int NN, input bit relu,
                                output int y[]);
    y = new[NN];
    for (int n = 0; n < NN; n++) begin
      longint acc;
      acc = longint'(b[n]) * 256;
      for (int i = 0; i < NI; i++) acc += longint'(x[i]) * longint'(wt[n*NI + i]);
      y[n] = requant(acc, relu);
    end
  endfunction

  // Uniform random integer in [lo, hi].
  function automatic int rnd(int lo, int hi);
    return lo + int'($urandom_range(hi - lo));
  endfunction

endpackage
