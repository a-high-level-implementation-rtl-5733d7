// tb_mac_sweep: the parallelism sweep of the evaluation. The same networks
// are built with different numbers of MAC units per layer and each is run
// on random weights and inputs, checked output by output against the
// reference model, and its first-inference latency is checked against the
// timing model in ann_model_pkg:
//   FCNN-3  16 inputs, two layers of 32 neurons on M = 1, 2, 4, 16 and 32
//           MACs, 3-neuron output layer on one MAC (8 MACs is covered by
//           tb_workloads). At M = 16 the first layer (16 inputs) saves its
//           results more slowly than it computes them and must stall; at
//           M = 32 one neuron group covers the whole layer.
//   CNN-A   the default setup A network with M = 1, 2 and 10 MACs in its
//           convolutional and fully-connected layers (5 is the default,
//           covered by tb_ann_full). At M = 10 one group covers all neurons;
//           at M = 1 there are ten groups.
// The cycle counts are printed, so the effect of the parallelism on speed
// can be read off.
//
// The swept ranges follow the document's evaluation (1 to 32 MACs for the
// fully-connected network, 1 to 10 for the convolutional one); the chosen
// points inside those ranges and the one-MAC output layer are this design's
// choices.
module tb_mac_sweep;
  import ann_pkg::*;
  import ann_model_pkg::*;

  localparam int NF = 5;
  localparam int NC = 3;
  localparam int FM[NF] = '{1, 2, 4, 16, 32};
  localparam int CM[NC] = '{1, 2, 10};

  function automatic net_cfg_t cnn_a(int m);
    net_cfg_t n;
    n    = '0;
    n[0] = mk_layer(L_CONV, 10, m, 5, 1, 0, ACT_RELU);
    n[1] = mk_layer(L_POOL, 0, 1, 2, 2, 0, ACT_LINEAR);
    n[2] = mk_layer(L_FC, 10, m, 1, 1, 0, ACT_LINEAR);
    return n;
  endfunction

  int c[NF+NC], f[NF+NC], lat[NF+NC], itv[NF+NC];
  bit d[NF+NC];
  int checks = 0, failures = 0;

  for (genvar i = 0; i < NF; i++) begin : g_fc
    ann_bench #(.NET(fcnn(3, FM[i])), .NL(3), .DIN0(FCNN_IN), .RUNS(3)) b
      (.checks(c[i]), .failures(f[i]), .latency(lat[i]), .interval(itv[i]), .done(d[i]));
  end
  for (genvar i = 0; i < NC; i++) begin : g_cnn
    ann_bench #(.NET(cnn_a(CM[i])), .NL(3), .DIN0(CNN_IN), .RUNS(2)) b
      (.checks(c[NF+i]), .failures(f[NF+i]), .latency(lat[NF+i]), .interval(itv[NF+i]),
       .done(d[NF+i]));
  end

  initial begin
    #10ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    bit all_done;
    do begin
      #1us;
      all_done = 1'b1;
      foreach (d[i]) if (!d[i]) all_done = 1'b0;
    end while (!all_done);
    for (int i = 0; i < NF + NC; i++) begin
      int e;
      string name;
      if (i < NF) begin
        name = $sformatf("FCNN-3 M=%0d", FM[i]);
        e = model_latency(fcnn(3, FM[i]), 3, 1, 1, 16);
      end else begin
        name = $sformatf("CNN-A  M=%0d", CM[i-NF]);
        e = model_latency(cnn_a(CM[i-NF]), 3, 20, 20, 1);
      end
      $display("%-13s latency %6d cycles, interval %6d cycles, checks %0d, failures %0d",
               name, lat[i], itv[i], c[i], f[i]);
      checks += c[i] + 1;
      failures += f[i];
      if (lat[i] != e) begin
        failures++;
        $display("FAIL: %s latency %0d, timing model %0d", name, lat[i], e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
