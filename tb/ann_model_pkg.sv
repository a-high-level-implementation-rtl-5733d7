// ann_model_pkg: behavioural reference model of the network, used by the
// testbenches to work out expected outputs independently of the RTL.
//
// Volumes are flat int arrays in channel-minor order ((h*W + w)*D + d).
// Weights of a layer are a flat int array, neuron after neuron, each
// neuron's bias first and then its weights in receptive-field order
// (fy, fx, d): the order the weight stream uses. Arithmetic: the bias is
// scaled to the product format (times 2^5), products of 9-bit values with
// 5 fractional bits are summed exactly, the sum is shifted right by 5
// (rounding towards minus infinity), passed through ReLU when selected and
// saturated to [-256, 255].
//
// The neuron equation, the output-size rule and the pooling follow the
// document; the rounding, saturation, storage order and latency formula
// model this design's own choices.
package ann_model_pkg;
  import ann_pkg::*;

  typedef int ivec_t[];

  function automatic int sat9(int v);
    if (v > 255) return 255;
    if (v < -256) return -256;
    return v;
  endfunction

  // output volume, computed here from the size rule on its own
  function automatic void model_dims(layer_cfg_t c, int h, int w, int d,
                                     output int ho, output int wo, output int dout);
    int fh, fw, sv, sh, pt, pb, pl, pr;
    if (c.kind == L_FC) begin
      ho = 1; wo = 1; dout = c.neurons;
      return;
    end
    fh = c.fh; fw = c.fw; sv = c.stv; sh = c.sth;
    pt = c.pt; pb = c.pb; pl = c.pl; pr = c.pr;
    ho   = (h - fh + pt + pb) / sv + 1;
    wo   = (w - fw + pl + pr) / sh + 1;
    dout = (c.kind == L_POOL) ? d : int'(c.neurons);
  endfunction

  function automatic ivec_t model_layer(layer_cfg_t c, int h, int w, int d,
                                        ivec_t x, ivec_t wt);
    ivec_t y;
    int ho, wo, dout, fh, fw, sv, sh, pt, pl, nw;
    model_dims(c, h, w, d, ho, wo, dout);
    y = new[ho * wo * dout];
    if (c.kind == L_FC) begin
      fh = h; fw = w; sv = 1; sh = 1; pt = 0; pl = 0;
    end else begin
      fh = c.fh; fw = c.fw; sv = c.stv; sh = c.sth; pt = c.pt; pl = c.pl;
    end
    nw = fh * fw * d + 1;
    for (int oy = 0; oy < ho; oy++)
      for (int ox = 0; ox < wo; ox++)
        for (int o = 0; o < dout; o++) begin
          longint acc;
          int m;
          bit started;
          acc = 0; m = 0; started = 0;
          if (c.kind != L_POOL) acc = longint'(wt[o * nw]) * 32;
          for (int fy = 0; fy < fh; fy++)
            for (int fx = 0; fx < fw; fx++) begin
              int iy, ix;
              iy = oy * sv + fy - pt;
              ix = ox * sh + fx - pl;
              if (c.kind == L_POOL) begin
                int v;
                v = (iy < 0 || iy >= h || ix < 0 || ix >= w) ? 0 : x[(iy * w + ix) * d + o];
                if (!started || v > m) m = v;
                started = 1;
              end else begin
                for (int dd = 0; dd < d; dd++) begin
                  int v;
                  v = (iy < 0 || iy >= h || ix < 0 || ix >= w) ? 0 : x[(iy * w + ix) * d + dd];
                  acc += longint'(v) * longint'(wt[o * nw + 1 + (fy * fw + fx) * d + dd]);
                end
              end
            end
          if (c.kind == L_POOL) y[(oy * wo + ox) * dout + o] = m;
          else begin
            longint z;
            z = acc >>> 5;
            if (c.act == ACT_RELU && z < 0) z = 0;
            if (z > 255) z = 255;
            if (z < -256) z = -256;
            y[(oy * wo + ox) * dout + o] = int'(z);
          end
        end
    return y;
  endfunction

  // number of weight words of a layer (0 for max-pooling)
  function automatic int model_nweights(layer_cfg_t c, int h, int w, int d);
    if (c.kind == L_POOL) return 0;
    if (c.kind == L_FC) return int'(c.neurons) * (h * w * d + 1);
    return int'(c.neurons) * (int'(c.fh) * int'(c.fw) * d + 1);
  endfunction

  // Cycle count of one inference on an idle network, from the clock edge
  // that accepts the first input word to the edge that raises the last
  // layer's output flag:
  //   input stream          N0 - 1 further words
  //   copy between layers   N + 2 (read start, N reads, flag)
  //   FC / conv layer       1 start edge + G*P*(K+1) issue cycles + memory
  //                         read + MAC result + one save cycle per neuron of
  //                         the last group
  //                         + save stalls: an iteration that leaves n results
  //                         to save holds the next iteration's last term for
  //                         max(0, n + 2 - K) cycles (K = Fh*Fw*D)
  //   max-pooling layer     1 start edge + P*D*Fh*Fw issue cycles + max
  //                         result + output write
  function automatic int model_latency(net_cfg_t net, int nl, int h, int w, int d);
    int t, ho, wo, dout, g, k, m, s;
    t = h * w * d - 1;
    for (int l = 0; l < nl; l++) begin
      layer_cfg_t c;
      c = net[l];
      if (l > 0) t += h * w * d + 2;
      model_dims(c, h, w, d, ho, wo, dout);
      if (c.kind == L_POOL) t += 1 + ho * wo * d * int'(c.fh) * int'(c.fw) + 2;
      else begin
        m = c.macs;
        s = c.neurons;
        g = (s + m - 1) / m;
        k = (c.kind == L_FC) ? h * w * d : int'(c.fh) * int'(c.fw) * d;
        t += 1 + g * ho * wo * (k + 1) + 2 + (s - (g - 1) * m);
        for (int gi = 0; gi < g; gi++) begin
          int n, st;
          n  = (gi == g - 1) ? s - (g - 1) * m : m;
          st = (n + 2 > k) ? n + 2 - k : 0;
          t += st * (ho * wo - ((gi == g - 1) ? 1 : 0));
        end
      end
      h = ho; w = wo; d = dout;
    end
    return t;
  endfunction

  function automatic int rnd_val(int lo, int hi);
    return lo + int'($urandom % unsigned'(hi - lo + 1));
  endfunction

endpackage
