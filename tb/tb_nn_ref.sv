// tb_nn_ref: reference arithmetic and test data shared by the testbenches.
//
// Works in plain integers, independent of the RTL: a value is a 16-bit Q7.8
// number held in an int, a dot product is summed in a longint with 16 fraction
// bits, then shifted, clipped by ReLU and saturated. wgen() gives deterministic
// pseudo-random weights and biases in [-32, 31] (about +-0.125) from a hash of the
// memory select, unit and index; pgen() gives pixels in [0, 255] (0 to ~1.0).
package tb_nn_ref;

  function automatic int unsigned hash3(int unsigned a, int unsigned b, int unsigned c);
    int unsigned h;
    h = a * 32'h9E3779B1 ^ (b + 32'h1234) * 32'h85EBCA77 ^ (c + 32'h77) * 32'hC2B2AE3D;
    h ^= h >> 15;
    h *= 32'h2C1B3C6D;
    h ^= h >> 12;
    h *= 32'h297A2D39;
    h ^= h >> 15;
    return h;
  endfunction

  function automatic int wgen(int sel, int unit, int idx);
    return int'(hash3(sel, unit, idx) % 64) - 32;
  endfunction

  function automatic int pgen(int img, int idx);
    return int'(hash3(100 + img, 7, idx) % 256);
  endfunction

  function automatic int rq(longint acc, int bias, bit relu);
    longint s;
    s = (acc + (longint'(bias) * 256)) >>> 8;
    if (relu && s < 0) s = 0;
    if (s > 32767)  s = 32767;
    if (s < -32768) s = -32768;
    return int'(s);
  endfunction

  // dense layer: out[o] = rq(sum_i in[i] * w(sel, o, i), b(bsel, o))
  function automatic void dense(input int in[], input int nin, input int nout,
                                input int sel, input int bsel, input bit relu,
                                output int out[]);
    out = new[nout];
    for (int o = 0; o < nout; o++) begin
      longint acc = 0;
      for (int i = 0; i < nin; i++) acc += longint'(in[i]) * wgen(sel, o, i);
      out[o] = rq(acc, wgen(bsel, o, 0), relu);
    end
  endfunction

  // KxK convolution with zero padding, stride 1, bias and ReLU.
  // pads counts the taps that fell into the padding.
  function automatic void conv(input int in[], input int h, input int w, input int cin,
                               input int cout, input int k, input int pad, input int sel,
                               input int bsel, output int out[], inout longint pads);
    out = new[cout * h * w];
    for (int co = 0; co < cout; co++)
      for (int oy = 0; oy < h; oy++)
        for (int ox = 0; ox < w; ox++) begin
          longint acc = 0;
          for (int ci = 0; ci < cin; ci++)
            for (int ky = 0; ky < k; ky++)
              for (int kx = 0; kx < k; kx++) begin
                int iy = oy + ky - pad, ix = ox + kx - pad;
                if (iy < 0 || iy >= h || ix < 0 || ix >= w) pads++;
                else acc += longint'(in[(ci * h + iy) * w + ix]) *
                            wgen(sel, co, (ci * k + ky) * k + kx);
              end
          out[(co * h + oy) * w + ox] = rq(acc, wgen(bsel, co, 0), 1'b1);
        end
  endfunction

  function automatic int floor_div4(int s);
    return (s >= 0) ? s / 4 : -((-s + 3) / 4);
  endfunction

  // 2x2 stride-2 pooling, max or average (floor)
  function automatic void pool(input int in[], input int h, input int w, input int c,
                               input bit avg, output int out[]);
    out = new[c * (h / 2) * (w / 2)];
    for (int ch = 0; ch < c; ch++)
      for (int oy = 0; oy < h / 2; oy++)
        for (int ox = 0; ox < w / 2; ox++) begin
          int m = -100000, s = 0;
          for (int d = 0; d < 4; d++) begin
            int v = in[(ch * h + 2 * oy + d / 2) * w + 2 * ox + d % 2];
            s += v;
            if (v > m) m = v;
          end
          out[(ch * (h / 2) + oy) * (w / 2) + ox] = avg ? floor_div4(s) : m;
        end
  endfunction

  function automatic int argmax(int v[]);
    int b = 0;
    for (int i = 1; i < v.size(); i++) if (v[i] > v[b]) b = i;
    return b;
  endfunction

endpackage
