// tcnn_ref_pkg: integer reference model of the ternary CNN, used by the
// testbenches to compute expected results independently of the RTL.
// All maps are flat int arrays: feature maps indexed (row*W + col)*C + ch,
// convolution weights ((f*4 + kh)*3 + kw)*C + ch, dense weights j*NIN + i.
package tcnn_ref_pkg;

  function automatic int tern(int v, int lo, int hi);
    return (v > hi) ? 1 : (v < lo) ? -1 : 0;
  endfunction

  function automatic void conv(input int x[], input int H, input int W, input int C,
                               input int w[], input int F, input int lo[], input int hi[],
                               output int y[]);
    int HO = H - 3, WO = W - 2;
    y = new[HO*WO*F];
    for (int r = 0; r < HO; r++)
      for (int c = 0; c < WO; c++)
        for (int f = 0; f < F; f++) begin
          int s = 0;
          for (int a = 0; a < 4; a++)
            for (int b = 0; b < 3; b++)
              for (int ch = 0; ch < C; ch++)
                s += x[((r+a)*W + c+b)*C + ch] * w[((f*4 + a)*3 + b)*C + ch];
          y[(r*WO + c)*F + f] = tern(s, lo[f], hi[f]);
        end
  endfunction

  function automatic void pool(input int x[], input int H, input int W, input int C,
                               output int y[]);
    int HO = H / 4;
    y = new[HO*W*C];
    for (int r = 0; r < HO; r++)
      for (int c = 0; c < W; c++)
        for (int ch = 0; ch < C; ch++) begin
          int m = -2;
          for (int k = 0; k < 4; k++)
            if (x[((4*r+k)*W + c)*C + ch] > m) m = x[((4*r+k)*W + c)*C + ch];
          y[(r*W + c)*C + ch] = m;
        end
  endfunction

  function automatic void dense(input int x[], input int w[], input int NOUT, output int s[]);
    s = new[NOUT];
    for (int j = 0; j < NOUT; j++) begin
      s[j] = 0;
      foreach (x[i]) s[j] += x[i] * w[j*x.size() + i];
    end
  endfunction

  // Four-piece linear sigmoid on z = (s*g + b)/256, result in 1/256 units, max 255.
  function automatic int sig_q8(int s, int g, int b);
    longint z = longint'(s) * g + b;
    longint a = (z < 0) ? -z : z;
    longint p;
    if (a >= 5*256)            p = 256;
    else if (a*8 >= 19*256)    p = a/32 + 216;
    else if (a >= 256)         p = a/8 + 160;
    else                       p = a/4 + 128;
    if (z < 0) p = 256 - p;
    return (p > 255) ? 255 : int'(p);
  endfunction

  // Whole network on one portion image img[h*W + l] (0/1).
  function automatic void portion(input int img[], input int H, input int W,
      input int F1, input int F2, input int NH,
      input int w1[], input int l1[], input int h1[],
      input int w2[], input int l2[], input int h2[],
      input int wd[], input int ld[], input int hd[],
      input int wo[], input int g[], input int b[],
      output int y[]);
    int c1[], p1[], c2[], p2[], sd[], ad[], so[];
    int HO1 = H - 3, WO1 = W - 2, HP1 = (H - 3) / 4, HO2 = HP1 - 3, WO2 = WO1 - 2;
    conv(img, H, W, 1, w1, F1, l1, h1, c1);
    pool(c1, HO1, WO1, F1, p1);
    conv(p1, HP1, WO1, F1, w2, F2, l2, h2, c2);
    pool(c2, HO2, WO2, F2, p2);
    dense(p2, wd, NH, sd);
    ad = new[NH];
    foreach (sd[j]) ad[j] = tern(sd[j], ld[j], hd[j]);
    dense(ad, wo, 5, so);
    y = new[5];
    foreach (so[j]) y[j] = sig_q8(so[j], g[j], b[j]);
  endfunction

  typedef struct {
    int trig, n, lv, lpt, leta, sv, spt, seta;
  } res_t;

  // Merge by building the candidate list and picking the two best pT values.
  function automatic res_t merge(input int y[][], input int H, input int thr);
    res_t r;
    int pt[$], eta[$];
    r = '{default: 0};
    foreach (y[p]) begin
      int n = (y[p][4] * 3 + 128) / 256;
      r.n += n;
      for (int k = 0; k < n && k < 2; k++) begin
        pt.push_back(y[p][2*k]);
        eta.push_back(p*H + (y[p][2*k+1] * H) / 256);
      end
    end
    for (int pass = 0; pass < 2; pass++) begin
      int best = -1;
      foreach (pt[i]) if (pt[i] >= 0 && (best < 0 || pt[i] > pt[best])) best = i;
      if (best >= 0) begin
        if (pass == 0) begin r.lv = 1; r.lpt = pt[best]; r.leta = eta[best]; end
        else           begin r.sv = 1; r.spt = pt[best]; r.seta = eta[best]; end
        pt[best] = -1;
      end
    end
    r.trig = (r.lv && r.lpt >= thr) ? 1 : 0;
    return r;
  endfunction

  // Random ternary value with probability pz of zero.
  function automatic int rtrit(int pz_percent);
    if (($urandom % 100) < pz_percent) return 0;
    return ($urandom % 2) ? 1 : -1;
  endfunction

  function automatic int code(int t);
    return (t == 1) ? 1 : (t == -1) ? 3 : 0;
  endfunction

endpackage
