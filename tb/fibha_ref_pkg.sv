// fibha_ref_pkg: integer reference models used by the testbenches.
//
// Feature maps are flat int queues indexed (r*W + c)*C + ch. Weights of a
// KxK convolution are indexed co*K*K*CIN + (i*K+j)*CIN + ci (a pointwise
// layer is the case K = 1); depthwise weights ch*K*K + i*K + j. Batch norm
// is y = (acc*scale + bias) >>> 8, then ReLU (optional) and saturation to
// [-128, 127]. Zero padding K/2 on every side.
package fibha_ref_pkg;
  function automatic int ref_bn(longint acc, int scale, int bias, bit relu);
    longint t;
    t = (acc * scale + bias) >>> 8;
    if (relu && t < 0) return 0;
    if (t > 127) return 127;
    if (t < -128) return -128;
    return int'(t);
  endfunction

  function automatic int sat8(int v);
    if (v > 127) return 127;
    if (v < -128) return -128;
    return v;
  endfunction

  function automatic int out_dim(int n, int k, int s);
    return (n + 2 * (k / 2) - k) / s + 1;
  endfunction

  function automatic void ref_conv(input int in[$], input int h, input int w, input int cin,
                                   input int wt[$], input int sc[$], input int bi[$],
                                   input int cout, input int k, input int s, input bit relu,
                                   output int out[$]);
    int ho, wo, p;
    ho = out_dim(h, k, s);
    wo = out_dim(w, k, s);
    p  = k / 2;
    out = {};
    for (int r = 0; r < ho; r++)
      for (int c = 0; c < wo; c++)
        for (int co = 0; co < cout; co++) begin
          longint acc = 0;
          for (int i = 0; i < k; i++)
            for (int j = 0; j < k; j++) begin
              int rr = r * s - p + i, cc = c * s - p + j;
              if (rr >= 0 && rr < h && cc >= 0 && cc < w)
                for (int ci = 0; ci < cin; ci++)
                  acc += longint'(in[(rr * w + cc) * cin + ci]) *
                         longint'(wt[co * k * k * cin + (i * k + j) * cin + ci]);
            end
          out.push_back(ref_bn(acc, sc[co], bi[co], relu));
        end
  endfunction

  function automatic void ref_dw(input int in[$], input int h, input int w, input int ch_n,
                                 input int wt[$], input int sc[$], input int bi[$],
                                 input int k, input int s, input bit relu,
                                 output int out[$]);
    int ho, wo, p;
    ho = out_dim(h, k, s);
    wo = out_dim(w, k, s);
    p  = k / 2;
    out = {};
    for (int r = 0; r < ho; r++)
      for (int c = 0; c < wo; c++)
        for (int ch = 0; ch < ch_n; ch++) begin
          longint acc = 0;
          for (int i = 0; i < k; i++)
            for (int j = 0; j < k; j++) begin
              int rr = r * s - p + i, cc = c * s - p + j;
              if (rr >= 0 && rr < h && cc >= 0 && cc < w)
                acc += longint'(in[(rr * w + cc) * ch_n + ch]) * longint'(wt[ch * k * k + i * k + j]);
            end
          out.push_back(ref_bn(acc, sc[ch], bi[ch], relu));
        end
  endfunction

  // random helpers
  function automatic int rnd(int lo, int hi);
    return lo + int'($urandom % (hi - lo + 1));
  endfunction

  function automatic void rnd_fill(output int q[$], input int n, input int lo, input int hi);
    q = {};
    for (int i = 0; i < n; i++) q.push_back(rnd(lo, hi));
  endfunction
endpackage
