// tb_weight_loader: self-checking test of weight_loader on a four-layer
// network: FC (5 neurons, 2 MACs) on a 1x1x4 input, max-pooling (no
// weights, must be skipped), convolution 2x2 (3 neurons, 3 MACs) and FC
// (2 neurons, 1 MAC). Streams the words with random gaps and checks, for
// every word, the target layer, MAC and address worked out here from the
// neuron-major stream order, then that loaded rises after the last word
// and w_ready falls.
//
// A state machine loading the weights follows the document; the stream
// order checked here is this design's choice.
module tb_weight_loader;
  import ann_pkg::*;

  function automatic net_cfg_t test_net();
    net_cfg_t n;
    n    = '0;
    n[0] = mk_layer(L_FC,   5, 2, 1, 1, 0, ACT_RELU);
    n[1] = mk_layer(L_POOL, 0, 1, 1, 1, 0, ACT_LINEAR);
    n[2] = mk_layer(L_CONV, 3, 3, 1, 1, 0, ACT_RELU);
    n[3] = mk_layer(L_FC,   2, 1, 1, 1, 0, ACT_LINEAR);
    return n;
  endfunction

  localparam net_cfg_t NET = test_net();
  localparam dims_t    DIN0 = '{h: 16'd1, w: 16'd1, d: 16'd4};

  logic clk = 1'b0, rst_n = 1'b0;
  logic w_valid = 1'b0, w_ready, loaded;
  wgt_t w_data = '0, wl_data;
  logic [MAX_LAYERS-1:0] wl_layer;
  logic [7:0] wl_mac;
  logic [15:0] wl_addr;
  int checks = 0, failures = 0;

  weight_loader #(.NET(NET), .NL(4), .DIN0(DIN0), .WAW(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // layer l: neurons, MACs, words per neuron (computed by hand:
  // layer 0 FC on 1x1x4 -> 5 words; layer 2 conv 1x1 on 1x1x5 -> 6 words;
  // layer 3 FC on 1x1x3 -> 4 words)
  int lyr_tab [3] = '{0, 2, 3};
  int s_tab   [3] = '{5, 3, 2};
  int m_tab   [3] = '{2, 3, 1};
  int nw_tab  [3] = '{5, 6, 4};

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    chk(!loaded, "loaded low after reset");
    for (int t = 0; t < 3; t++)
      for (int s = 0; s < s_tab[t]; s++)
        for (int k = 0; k < nw_tab[t]; k++) begin
          w_valid = 1'b0;
          while ($urandom % 3 == 0) @(negedge clk);
          w_valid = 1'b1;
          w_data  = wgt_t'($urandom);
          while (!w_ready) @(negedge clk);
          #1;
          chk(wl_layer == (MAX_LAYERS'(1) << lyr_tab[t]),
              $sformatf("layer select %b for layer %0d", wl_layer, lyr_tab[t]));
          chk(int'(wl_mac) == s % m_tab[t], $sformatf("mac %0d for neuron %0d", wl_mac, s));
          chk(int'(wl_addr) == (s / m_tab[t]) * nw_tab[t] + k,
              $sformatf("addr %0d for layer %0d neuron %0d word %0d", wl_addr, t, s, k));
          chk(wl_data == w_data, "data passed through");
          @(negedge clk);
        end
    w_valid = 1'b0;
    repeat (3) @(negedge clk);
    chk(loaded, "loaded after last word");
    chk(!w_ready, "w_ready low after loading");
    chk(wl_layer == '0, "no write after loading");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
