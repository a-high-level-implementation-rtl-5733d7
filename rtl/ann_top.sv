// ann_top: a feed-forward (non-recurrent) neural network for inference,
// built at elaboration time from a per-layer configuration array.
//
// NET holds one layer_cfg_t record per layer (type, neurons, MACs,
// receptive field, stride, padding, activation); NL says how many of its
// entries are used and DIN0 is the input volume. A generate loop creates
// one mac_layer (fully-connected or convolutional) or maxpool_layer per
// entry, derives each layer's input volume from the previous layer's output
// volume, and chains them: layer i's stage 1 reads layer i-1's output
// memory through a read port and a full/release flag pair. Layers work as a
// pipeline: while layer i elaborates one input, layer i-1 may already
// process the next.
//
// Interface (all synchronous to clk, active-low asynchronous reset):
//   w_valid/w_data/w_ready  weight stream, accepted after reset until
//                           loaded goes high (order: see weight_loader);
//   in_valid/in_data/in_ready  input volume, one value per accepted word,
//                           channel-minor order (h, w, d); in_ready stays
//                           low until the weights are loaded;
//   out_full, out_rd_en/out_rd_addr/out_rd_data, out_release
//                           output memory of the last layer: when out_full
//                           is high the result is complete and may be read
//                           (one-cycle read latency); a one-cycle
//                           out_release pulse hands the memory back.
// The default configuration is the convolutional network "setup A" of the
// evaluation (20x20x1 input, convolution with 10 neurons, max-pooling,
// fully-connected layer with 10 outputs, 5 MACs per layer); its kernel,
// pooling window, stride and padding are this design's assumptions.
module ann_top
  import ann_pkg::*;
#(
  parameter net_cfg_t NET  = cnn_setup_a(),
  parameter int       NL   = 3,
  parameter dims_t    DIN0 = CNN_IN,
  localparam int OUT_N     = vol(layer_in_dims(NET, DIN0, NL)),
  localparam int OAW       = clog2_1(OUT_N),
  localparam int WAW       = 24
) (
  input  logic           clk,
  input  logic           rst_n,
  // weight loading
  input  logic           w_valid,
  input  wgt_t           w_data,
  output logic           w_ready,
  output logic           loaded,
  // network input
  input  logic           in_valid,
  input  data_t          in_data,
  output logic           in_ready,
  // network output memory
  output logic           out_full,
  input  logic           out_rd_en,
  input  logic [OAW-1:0] out_rd_addr,
  output data_t          out_rd_data,
  input  logic           out_release
);

  // weight distribution bus
  logic [MAX_LAYERS-1:0] wl_layer;
  logic [7:0]            wl_mac;
  logic [WAW-1:0]        wl_addr;
  wgt_t                  wl_data;

  weight_loader #(.NET(NET), .NL(NL), .DIN0(DIN0), .WAW(WAW)) u_wload (
    .clk, .rst_n, .w_valid, .w_data, .w_ready,
    .wl_layer, .wl_mac, .wl_addr, .wl_data, .loaded
  );

  // output-memory ports of every layer, read by the following layer
  logic        lo_full    [NL];
  logic        lo_rd_en   [NL];
  logic [31:0] lo_rd_addr [NL];
  data_t       lo_rd_data [NL];
  logic        lo_release [NL];

  logic  s_ready0;
  assign in_ready = loaded && s_ready0;

  for (genvar i = 0; i < NL; i++) begin : g_layer
    localparam dims_t DI  = layer_in_dims(NET, DIN0, i);
    localparam int    NI  = vol(DI);
    localparam int    NO  = vol(out_dims(NET[i], DI));
    localparam int    IAW = clog2_1(NI);
    localparam int    LAW = clog2_1(NO);

    logic           s_valid, s_ready;
    logic           src_full, src_rd_en, src_release;
    logic [IAW-1:0] src_rd_addr;
    data_t          src_rd_data;
    logic [LAW-1:0] out_addr;

    if (i == 0) begin : g_src_port
      assign s_valid     = in_valid && loaded;
      assign s_ready0    = s_ready;
      assign src_full    = 1'b0;
      assign src_rd_data = '0;
    end else begin : g_src_prev
      assign s_valid            = 1'b0;
      assign src_full           = lo_full[i-1];
      assign src_rd_data        = lo_rd_data[i-1];
      assign lo_rd_en[i-1]      = src_rd_en;
      assign lo_rd_addr[i-1]    = 32'(src_rd_addr);
      assign lo_release[i-1]    = src_release;
    end

    assign out_addr = lo_rd_addr[i][LAW-1:0];

    if (NET[i].kind == L_POOL) begin : g_pool
      maxpool_layer #(.CFG(NET[i]), .DIN(DI), .STREAM_SRC(i == 0)) u_layer (
        .clk, .rst_n,
        .s_valid, .s_data(in_data), .s_ready,
        .src_full, .src_rd_en, .src_rd_addr, .src_rd_data, .src_release,
        .out_full(lo_full[i]), .out_rd_en(lo_rd_en[i]), .out_rd_addr(out_addr),
        .out_rd_data(lo_rd_data[i]), .out_release(lo_release[i])
      );
    end else begin : g_mac
      localparam int MAW = clog2_1(int'(NET[i].macs));
      localparam int WDW = clog2_1(num_groups(NET[i]) * neuron_words(NET[i], DI));

      mac_layer #(.CFG(NET[i]), .DIN(DI), .STREAM_SRC(i == 0)) u_layer (
        .clk, .rst_n,
        .s_valid, .s_data(in_data), .s_ready,
        .src_full, .src_rd_en, .src_rd_addr, .src_rd_data, .src_release,
        .wl_en(wl_layer[i]), .wl_mac(wl_mac[MAW-1:0]), .wl_addr(wl_addr[WDW-1:0]),
        .wl_data,
        .out_full(lo_full[i]), .out_rd_en(lo_rd_en[i]), .out_rd_addr(out_addr),
        .out_rd_data(lo_rd_data[i]), .out_release(lo_release[i])
      );
    end
  end

  // the last layer's output memory is the network output
  assign out_full           = lo_full[NL-1];
  assign lo_rd_en[NL-1]     = out_rd_en;
  assign lo_rd_addr[NL-1]   = 32'(out_rd_addr);
  assign out_rd_data        = lo_rd_data[NL-1];
  assign lo_release[NL-1]   = out_release;

endmodule
