// ann_pkg: types, constants and elaboration-time functions shared by the
// layers of the feed-forward network.
//
// A network is described by an array of per-layer configuration records
// (layer_cfg_t), one element per hidden/output layer, in the order data
// flows. The array is carried down to every layer as a parameter, and the
// functions below derive each layer's input and output volume from it with
// the output-size rule
//   Hout = floor((H - Fh + Pt + Pb) / Stv) + 1
//   Wout = floor((W - Fw + Pl + Pr) / Sth) + 1
//   Dout = S (fully-connected / convolutional) or D (max-pooling).
// A fully-connected layer is treated as a convolution whose receptive
// field covers the whole input volume, so Hout = Wout = 1 and Dout = S.
//
// Data and weights are signed fixed point: 9 bits with 5 fractional bits,
// as in the reference applications. Volumes are stored channel-minor:
// element (h, w, d) of an H x W x D volume sits at address (h*W + w)*D + d.
// The storage order, the 32-bit accumulator and the default network
// geometry (receptive field, stride, padding) are this design's choices.
package ann_pkg;

  // Fixed-point formats (9-bit data and weights, 5 fractional bits).
  localparam int DATA_W  = 9;
  localparam int DATA_FB = 5;
  localparam int WGT_W   = 9;
  localparam int WGT_FB  = 5;
  localparam int ACC_W   = 32;

  localparam int MAX_LAYERS = 8;

  typedef enum logic [1:0] {
    L_FC   = 2'd0,
    L_CONV = 2'd1,
    L_POOL = 2'd2
  } layer_kind_e;

  typedef enum logic {
    ACT_RELU   = 1'b0,
    ACT_LINEAR = 1'b1
  } act_e;

  // One layer of the network. Fields that do not apply to a layer type
  // are ignored (S, MACS and ACT for max-pooling; the geometry for
  // fully-connected layers).
  typedef struct packed {
    layer_kind_e kind;
    logic [15:0] neurons;   // S
    logic [7:0]  macs;      // parallel MAC units (M)
    logic [7:0]  fh, fw;    // receptive field
    logic [7:0]  stv, sth;  // vertical / horizontal stride
    logic [7:0]  pt, pb, pl, pr; // zero padding
    act_e        act;
  } layer_cfg_t;

  typedef layer_cfg_t [MAX_LAYERS-1:0] net_cfg_t;

  typedef struct packed {
    logic [15:0] h, w, d;
  } dims_t;

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [WGT_W-1:0]  wgt_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  // Effective receptive field of a layer (the whole volume for FC).
  function automatic int eff_fh(layer_cfg_t c, dims_t di);
    return (c.kind == L_FC) ? int'(di.h) : int'(c.fh);
  endfunction
  function automatic int eff_fw(layer_cfg_t c, dims_t di);
    return (c.kind == L_FC) ? int'(di.w) : int'(c.fw);
  endfunction
  function automatic int eff_stv(layer_cfg_t c);
    return (c.kind == L_FC) ? 1 : int'(c.stv);
  endfunction
  function automatic int eff_sth(layer_cfg_t c);
    return (c.kind == L_FC) ? 1 : int'(c.sth);
  endfunction
  function automatic int eff_pad(layer_cfg_t c, int p);
    return (c.kind == L_FC) ? 0 : p;
  endfunction

  // Output volume of one layer (Eq. for Hout, Wout, Dout).
  function automatic dims_t out_dims(layer_cfg_t c, dims_t di);
    dims_t o;
    int hh, ww;
    hh = (int'(di.h) - eff_fh(c, di) + eff_pad(c, int'(c.pt)) + eff_pad(c, int'(c.pb)))
         / eff_stv(c) + 1;
    ww = (int'(di.w) - eff_fw(c, di) + eff_pad(c, int'(c.pl)) + eff_pad(c, int'(c.pr)))
         / eff_sth(c) + 1;
    o.h = 16'(hh);
    o.w = 16'(ww);
    o.d = (c.kind == L_POOL) ? di.d : c.neurons;
    return o;
  endfunction

  // Input volume of layer i of a network whose input volume is in0.
  function automatic dims_t layer_in_dims(net_cfg_t net, dims_t in0, int i);
    dims_t d;
    d = in0;
    for (int k = 0; k < MAX_LAYERS; k++)
      if (k < i) d = out_dims(net[k], d);
    return d;
  endfunction

  function automatic int vol(dims_t d);
    return int'(d.h) * int'(d.w) * int'(d.d);
  endfunction

  // Words per neuron in a weight memory: bias followed by Fh*Fw*D weights.
  function automatic int neuron_words(layer_cfg_t c, dims_t di);
    return eff_fh(c, di) * eff_fw(c, di) * int'(di.d) + 1;
  endfunction

  // Neuron groups evaluated one after the other by the M MACs.
  function automatic int num_groups(layer_cfg_t c);
    return (int'(c.neurons) + int'(c.macs) - 1) / int'(c.macs);
  endfunction

  function automatic int clog2_1(int v);
    return (v <= 1) ? 1 : $clog2(v);
  endfunction

  function automatic layer_cfg_t mk_layer(layer_kind_e kind, int s, int m, int f, int st,
                                          int pad, act_e act);
    layer_cfg_t c;
    c.kind    = kind;
    c.neurons = 16'(s);
    c.macs    = 8'(m);
    c.fh      = 8'(f);
    c.fw      = 8'(f);
    c.stv     = 8'(st);
    c.sth     = 8'(st);
    c.pt      = 8'(pad);
    c.pb      = 8'(pad);
    c.pl      = 8'(pad);
    c.pr      = 8'(pad);
    c.act     = act;
    return c;
  endfunction

  // Convolutional setup A of the evaluation: 20x20x1 input, convolution
  // with 10 neurons, max-pooling, fully-connected output with 10 neurons,
  // 5 MACs per layer. The 5x5 kernel, 2x2/2 pooling and no padding are
  // assumptions.
  function automatic net_cfg_t cnn_setup_a();
    net_cfg_t n;
    n    = '0;
    n[0] = mk_layer(L_CONV, 10, 5, 5, 1, 0, ACT_RELU);
    n[1] = mk_layer(L_POOL, 0, 1, 2, 2, 0, ACT_LINEAR);
    n[2] = mk_layer(L_FC, 10, 5, 1, 1, 0, ACT_LINEAR);
    return n;
  endfunction

  // Convolutional setup B: two convolutions, max-pooling, fully-connected.
  function automatic net_cfg_t cnn_setup_b();
    net_cfg_t n;
    n    = '0;
    n[0] = mk_layer(L_CONV, 10, 5, 5, 1, 0, ACT_RELU);
    n[1] = mk_layer(L_CONV, 10, 5, 3, 1, 0, ACT_RELU);
    n[2] = mk_layer(L_POOL, 0, 1, 2, 2, 0, ACT_LINEAR);
    n[3] = mk_layer(L_FC, 10, 5, 1, 1, 0, ACT_LINEAR);
    return n;
  endfunction

  // Fully-connected network for EMG gesture recognition: 16 inputs,
  // nl-1 layers of 32 neurons on m MACs and a 3-neuron output layer on one
  // MAC (the split that matches the reported multiplier and RAM counts).
  function automatic net_cfg_t fcnn(int nl, int m);
    net_cfg_t n;
    n = '0;
    for (int k = 0; k < MAX_LAYERS; k++)
      if (k < nl)
        n[k] = mk_layer(L_FC, (k == nl - 1) ? 3 : 32, (k == nl - 1) ? 1 : m,
                        1, 1, 0, (k == nl - 1) ? ACT_LINEAR : ACT_RELU);
    return n;
  endfunction

  localparam dims_t CNN_IN  = '{h: 16'd20, w: 16'd20, d: 16'd1};
  localparam dims_t FCNN_IN = '{h: 16'd1,  w: 16'd1,  d: 16'd16};

endpackage
