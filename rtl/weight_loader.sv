// weight_loader: state machine that fills the weight memories of all
// fully-connected and convolutional layers from one input stream.
//
// After reset it accepts words on a valid/ready stream (w_valid, w_data,
// w_ready) in this order: for each layer with weights (max-pooling layers
// are skipped), for each neuron s = 0..S-1, the bias followed by the
// Fh*Fw*D weights in receptive-field order (fy, fx, d). Word k of neuron s
// is written to the weight memory of MAC (s mod M) at address
// (s div M)*(Fh*Fw*D+1) + k of that layer: wl_layer is one-hot on the
// target layer and wl_mac/wl_addr select the memory word. One word per
// cycle; w_ready is high until the last word has been taken, after which
// loaded stays high until the next reset.
// That a state machine loads the weights follows the document; the stream
// order and the port format are this design's choices.
module weight_loader
  import ann_pkg::*;
#(
  parameter net_cfg_t NET  = cnn_setup_a(),
  parameter int       NL   = 3,
  parameter dims_t    DIN0 = CNN_IN,
  parameter int       WAW  = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  w_valid,
  input  wgt_t                  w_data,
  output logic                  w_ready,
  output logic [MAX_LAYERS-1:0] wl_layer,
  output logic [7:0]            wl_mac,
  output logic [WAW-1:0]        wl_addr,
  output wgt_t                  wl_data,
  output logic                  loaded
);

  // per-layer constants
  int unsigned l_s  [MAX_LAYERS];
  int unsigned l_m  [MAX_LAYERS];
  int unsigned l_nw [MAX_LAYERS];
  logic        l_has_w [MAX_LAYERS];

  for (genvar i = 0; i < MAX_LAYERS; i++) begin : g_const
    assign l_s[i]     = 32'(NET[i].neurons);
    assign l_m[i]     = 32'(NET[i].macs);
    assign l_nw[i]    = neuron_words(NET[i], layer_in_dims(NET, DIN0, i));
    assign l_has_w[i] = (i < NL) && (NET[i].kind != L_POOL);
  end

  typedef enum logic [1:0] {S_SKIP, S_LOAD, S_DONE} state_e;

  state_e      state;
  int unsigned lyr, nrn, wrd, mac, gbase;
  logic        take;

  assign w_ready  = (state == S_LOAD);
  assign take     = w_valid && w_ready;
  assign loaded   = (state == S_DONE);
  assign wl_data  = w_data;
  assign wl_mac   = 8'(mac);
  assign wl_addr  = WAW'(gbase + wrd);

  always_comb begin
    wl_layer = '0;
    if (take) wl_layer[lyr[$clog2(MAX_LAYERS)-1:0]] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_SKIP;
      {lyr, nrn, wrd, mac, gbase} <= '0;
    end else begin
      unique case (state)
        // move to the next layer that has weights, or finish
        S_SKIP: begin
          if (lyr >= NL) state <= S_DONE;
          else if (l_has_w[lyr]) state <= S_LOAD;
          else lyr <= lyr + 1;
        end
        S_LOAD: if (take) begin
          if (wrd == l_nw[lyr] - 1) begin
            wrd <= 0;
            if (nrn == l_s[lyr] - 1) begin
              {nrn, mac, gbase} <= '0;
              lyr   <= lyr + 1;
              state <= S_SKIP;
            end else begin
              nrn <= nrn + 1;
              if (mac == l_m[lyr] - 1) begin
                mac   <= 0;
                gbase <= gbase + l_nw[lyr];
              end else mac <= mac + 1;
            end
          end else wrd <= wrd + 1;
        end
        default: state <= S_DONE;
      endcase
    end
  end

endmodule
