// iris_ref_pkg: behavioural reference models used by the testbenches.
//
// Written independently of the RTL structure: plain integer and real
// arithmetic, whole arrays, no streaming. The CNN reference uses ordinary
// multiplication, which equals the power-of-two multiplier for the
// power-of-two weights of iris_pkg. All layer feature maps are kept in
// flat arrays indexed (row*W + col)*C + channel.
package iris_ref_pkg;
  import iris_pkg::*;

  // Approximate product by definition: every run of ones in B contributes
  // +-A * 2^(position of its lowest bit), negative when B is negative.
  function automatic longint ref_approx(longint a, longint b, int n);
    longint p;
    bit bn, prev, cur;
    p = 0;
    bn = b[n-1];
    prev = 1'b0;
    for (int i = 0; i < n; i++) begin
      cur = b[i];
      if (cur && !prev) p += (bn ? -a : a) * (longint'(1) << i);
      prev = cur;
    end
    return p;
  endfunction

  function automatic int sat16(longint acc);
    longint s;
    s = acc >>> FRAC;
    if (s > 32767) return 32767;
    if (s < -32768) return -32768;
    return int'(s);
  endfunction

  // 3x3 valid convolution, ReLU. in: W*H*CIN, out: (W-2)*(H-2)*COUT
  function automatic void ref_conv(input int in[], input int w, input int h, input int cin,
                                   input int cout, input int layer, output int out[]);
    longint acc;
    int ow, oh;
    ow = w - 2; oh = h - 2;
    out = new[ow*oh*cout];
    for (int y = 0; y < oh; y++)
      for (int x = 0; x < ow; x++)
        for (int k = 0; k < cout; k++) begin
          acc = 0;
          for (int c = 0; c < cin; c++)
            for (int r = 0; r < 3; r++)
              for (int q = 0; q < 3; q++)
                acc += longint'(in[((y+r)*w + x+q)*cin + c]) *
                       longint'(weight_val(layer, (k*cin + c)*9 + 3*r + q));
          acc += longint'(bias_val(layer, k)) * 256;
          out[(y*ow + x)*cout + k] = (sat16(acc) < 0) ? 0 : sat16(acc);
        end
  endfunction

  function automatic void ref_pool(input int in[], input int w, input int h, input int c,
                                   input int k, output int out[]);
    int ow, oh, m;
    ow = w / k; oh = h / k;
    out = new[ow*oh*c];
    for (int y = 0; y < oh; y++)
      for (int x = 0; x < ow; x++)
        for (int ch = 0; ch < c; ch++) begin
          m = -100000;
          for (int r = 0; r < k; r++)
            for (int q = 0; q < k; q++)
              if (in[((y*k+r)*w + x*k+q)*c + ch] > m) m = in[((y*k+r)*w + x*k+q)*c + ch];
          out[(y*ow + x)*c + ch] = m;
        end
  endfunction

  function automatic void ref_fc(input int in[], input int nin, input int nout, input int layer,
                                 input bit relu, output int out[]);
    longint acc;
    out = new[nout];
    for (int n = 0; n < nout; n++) begin
      acc = longint'(bias_val(layer, n)) * 256;
      for (int j = 0; j < nin; j++)
        acc += longint'(in[j]) * longint'(weight_val(layer, n*nin + j));
      out[n] = sat16(acc);
      if (relu && out[n] < 0) out[n] = 0;
    end
  endfunction

  // Softmax with the table quantisation (1/16 steps of x_i - max).
  function automatic void ref_softmax(input int x[], output real p[], output int amax);
    real e[];
    real s;
    int m, k;
    p = new[x.size()];
    e = new[x.size()];
    m = x[0]; amax = 0;
    foreach (x[i]) if (x[i] > m) begin m = x[i]; amax = i; end
    s = 0.0;
    foreach (x[i]) begin
      k = (m - x[i]) / 16;
      if (k > 255) k = 255;
      e[i] = $floor(65535.0 * $exp(-k / 16.0));
      s += e[i];
    end
    foreach (x[i]) p[i] = e[i] * 65536.0 / s;
  endfunction

  // Whole network on a 200x40 image of 8-bit pixels.
  function automatic void ref_cnn(input int img[], output int logits[]);
    int a0[], a1[], a2[], a3[], a4[], f1[], f2[], f3[];
    a0 = new[img.size()];
    foreach (img[i]) a0[i] = img[i] * 16;
    ref_conv(a0, 200, 40, 1, 6, 1, a1);
    ref_pool(a1, 198, 38, 6, 3, a2);
    ref_conv(a2, 66, 12, 6, 16, 2, a3);
    ref_pool(a3, 64, 10, 16, 5, a4);
    ref_fc(a4, 384, 120, 3, 1, f1);
    ref_fc(f1, 120, 120, 4, 1, f2);
    ref_fc(f2, 120, 84, 5, 1, f3);
    ref_fc(f3, 84, 40, 6, 0, logits);
  endfunction

  // ---------------- Canny reference ----------------
  // Edge map of a w x h image: out is (w-6) x (h-6).
  function automatic void ref_canny(input int img[], input int w, input int h, input int p1_q8,
                                    output int edges[]);
    int gx, gy, ax, ay, a, b, est;
    int mag[], dir[], cls[];
    int w1, h1, w2, h2, w3, h3, n0, n1, c, gn, s, mean, th, tl, has_strong;
    w1 = w-2; h1 = h-2; w2 = w-4; h2 = h-4; w3 = w-6; h3 = h-6;
    mag = new[w1*h1]; dir = new[w1*h1]; cls = new[w2*h2]; edges = new[w3*h3];
    for (int y = 0; y < h1; y++)
      for (int x = 0; x < w1; x++) begin
        gx = img[(y)*w+x+2] + 2*img[(y+1)*w+x+2] + img[(y+2)*w+x+2]
           - img[(y)*w+x]   - 2*img[(y+1)*w+x]   - img[(y+2)*w+x];
        gy = img[(y+2)*w+x] + 2*img[(y+2)*w+x+1] + img[(y+2)*w+x+2]
           - img[(y)*w+x]   - 2*img[(y)*w+x+1]   - img[(y)*w+x+2];
        ax = gx < 0 ? -gx : gx; ay = gy < 0 ? -gy : gy;
        a = ax > ay ? ax : ay; b = ax > ay ? ay : ax;
        est = (7*a + 4*b) / 8;
        mag[y*w1+x] = est > a ? est : a;
        // direction sector, with the 128-scaled slope limits of the datapath
        if (128*ay <= 53*ax) dir[y*w1+x] = 0;
        else if (128*ay >= 309*ax) dir[y*w1+x] = 2;
        else if ((gx < 0) == (gy < 0)) dir[y*w1+x] = 1;
        else dir[y*w1+x] = 3;
      end
    for (int y = 0; y < h2; y++)
      for (int x = 0; x < w2; x++) begin
        c = (y+1)*w1 + x+1;
        case (dir[c])
          0: begin n0 = mag[c-1];    n1 = mag[c+1];    end
          1: begin n0 = mag[c-w1-1]; n1 = mag[c+w1+1]; end
          2: begin n0 = mag[c-w1];   n1 = mag[c+w1];   end
          default: begin n0 = mag[c-w1+1]; n1 = mag[c+w1-1]; end
        endcase
        gn = (mag[c] >= n0 && mag[c] >= n1) ? mag[c] : 0;
        s = 0;
        for (int r = -1; r <= 1; r++) for (int q = -1; q <= 1; q++) s += mag[c + r*w1 + q];
        mean = (s * 7282) >> 16;
        th = (mean * p1_q8) >> 8; if (th > 4095) th = 4095;
        tl = th / 2;
        cls[y*w2+x] = gn > th ? 2 : (gn > tl ? 1 : 0);
      end
    for (int y = 0; y < h3; y++)
      for (int x = 0; x < w3; x++) begin
        c = (y+1)*w2 + x+1;
        has_strong = 0;
        for (int r = -1; r <= 1; r++) for (int q = -1; q <= 1; q++)
          if (!(r == 0 && q == 0) && cls[c + r*w2 + q] == 2) has_strong = 1;
        edges[y*w3+x] = (cls[c] == 2 || (cls[c] == 1 && has_strong != 0)) ? 1 : 0;
      end
  endfunction

endpackage
