// qnn_ref_pkg: reference model for the end-to-end testbenches.
//
// Weights, thresholds and image pixels come from integer hash functions, so
// a testbench can program the chip and compute the expected result without
// storing the network. The reference follows the network arithmetic only:
// binary activations are +1/-1 (bit 1/0), 8-bit pixels v enter the first
// layer as 2*v - 255, padding pixels are 0, a node outputs 1 when
// sum(w*x) > T, MAXPOOL is a maximum (OR), and the final layer's score is
// clamp(floor((sum - T) / LSB), -128, 127).
package qnn_ref_pkg;

  function automatic int unsigned mix(int unsigned a, int unsigned b, int unsigned c);
    int unsigned x;
    x = a * 32'h9E3779B1 ^ (b + 32'h7F4A7C15) * 32'h85EBCA77 ^ (c + 32'h165667B1) * 32'hC2B2AE3D;
    x ^= x >> 15;
    x *= 32'h2C1B3C6D;
    x ^= x >> 12;
    x *= 32'h297A2D39;
    x ^= x >> 15;
    return x;
  endfunction

  // Weight of branch b of node f in layer l, -4..+4
  function automatic int hw(int l, int f, int b);
    return int'(mix(l, f, b) % 9) - 4;
  endfunction

  // Threshold of node f in layer l, -range..+range
  function automatic int ht(int l, int f, int range);
    return int'(mix(l + 100, f, 7) % (2 * range + 1)) - range;
  endfunction

  // Pixel value of the test image
  function automatic int hp(int img, int y, int x, int c);
    return int'(mix(img + 1000, y * 4096 + x, c) % 256);
  endfunction

  function automatic int fdiv(int a, int b);
    return (a >= 0) ? a / b : -((-a + b - 1) / b);
  endfunction

  class fmap;
    int h, w, c;
    int d[];
    function new(int h_, int w_, int c_);
      h = h_; w = w_; c = c_;
      d = new[h * w * c];
    endfunction
    function int get(int y, int x, int ch);
      return d[(y * w + x) * c + ch];
    endfunction
    function void set(int y, int x, int ch, int v);
      d[(y * w + x) * c + ch] = v;
    endfunction
  endclass

  // Threshold range used for a layer, from its input kind
  function automatic int thr_range(bit eight_bit);
    return eight_bit ? 2000 : 10;
  endfunction

  // Weight a CONV layer programs on branch b = (r*kmax + c)*cmax + ch
  function automatic int conv_w(int l, int f, int b, int kmax, int cmax, int k, int cin);
    int r, c, ch;
    ch = b % cmax;
    c  = (b / cmax) % kmax;
    r  = b / (cmax * kmax);
    return (r < k && c < k && ch < cin) ? hw(l, f, b) : 0;
  endfunction

  function automatic fmap ref_conv(fmap in, int l, int kmax, int cmax, bit eight_bit,
                                   int k, int s, int plo, int phi, int nf);
    int oh, ow, sum, py, px, v, b;
    fmap o;
    oh = (in.h + plo + phi - k) / s + 1;
    ow = (in.w + plo + phi - k) / s + 1;
    o = new(oh, ow, nf);
    for (int f = 0; f < nf; f++) begin
      int wt [];
      int t;
      wt = new[k * k * in.c];
      for (int kr = 0; kr < k; kr++) for (int kc = 0; kc < k; kc++) for (int ch = 0; ch < in.c; ch++) begin
        b = ((k - 1 - kr) * kmax + (k - 1 - kc)) * cmax + ch;
        wt[(kr * k + kc) * in.c + ch] = hw(l, f, b);
      end
      t = ht(l, f, thr_range(eight_bit));
      for (int oy = 0; oy < oh; oy++) for (int ox = 0; ox < ow; ox++) begin
        sum = 0;
        for (int kr = 0; kr < k; kr++) begin
          py = oy * s + kr - plo;
          for (int kc = 0; kc < k; kc++) begin
            px = ox * s + kc - plo;
            for (int ch = 0; ch < in.c; ch++) begin
              v = (py >= 0 && py < in.h && px >= 0 && px < in.w) ? in.get(py, px, ch) : 0;
              sum += wt[(kr * k + kc) * in.c + ch] * (eight_bit ? 2 * v - 255 : 2 * v - 1);
            end
          end
        end
        o.set(oy, ox, f, (sum > t) ? 1 : 0);
      end
    end
    return o;
  endfunction

  function automatic fmap ref_pool(fmap in, int k, int s);
    int oh, ow, m;
    fmap o;
    oh = (in.h - k) / s + 1;
    ow = (in.w - k) / s + 1;
    o = new(oh, ow, in.c);
    for (int oy = 0; oy < oh; oy++) for (int ox = 0; ox < ow; ox++) for (int ch = 0; ch < in.c; ch++) begin
      m = 0;
      for (int r = 0; r < k; r++) for (int c = 0; c < k; c++) m |= in.get(oy * s + r, ox * s + c, ch);
      o.set(oy, ox, ch, m);
    end
    return o;
  endfunction

  // Flatten a map into FC branches: pixel n (raster order) is word n,
  // channel ch is bit ch, branch = (n_words-1-n)*c + ch
  function automatic fmap flatten(fmap in);
    fmap o;
    int nw;
    nw = in.h * in.w;
    o = new(1, 1, nw * in.c);
    for (int n = 0; n < nw; n++) for (int ch = 0; ch < in.c; ch++)
      o.d[(nw - 1 - n) * in.c + ch] = in.d[n * in.c + ch];
    return o;
  endfunction

  // FC layer: returns node sums minus thresholds (a 1 x 1 x nn map)
  function automatic fmap ref_fc_diff(fmap x, int l, int nn);
    fmap o;
    int sum;
    o = new(1, 1, nn);
    for (int f = 0; f < nn; f++) begin
      sum = 0;
      for (int b = 0; b < x.c; b++) sum += hw(l, f, b) * (2 * x.d[b] - 1);
      o.d[f] = sum - ht(l, f, thr_range(1'b0));
    end
    return o;
  endfunction

endpackage
