// tb_workloads: the networks of the evaluation, each run on random
// weights and inputs and checked output by output against the reference
// model:
//   FCNN-2/3/4  fully-connected, 16 inputs, hidden layers of 32 neurons,
//               3 outputs, 8 MACs per layer (1 in the 3-neuron layer)
//   CNN-B       20x20x1 input, 5x5 convolution (10 neurons), 3x3
//               convolution (10 neurons), 2x2/2 max-pooling,
//               fully-connected layer with 10 outputs, 5 MACs per layer
// (convolutional setup A is the default configuration, see tb_ann_full).
// The latency of the first inference must equal the cycle count of the
// timing model in ann_model_pkg. The average interval between results with
// inputs sent back to back is printed next to the roughly 100 cycles per
// elaboration reported for the reference implementation at 8 MACs per
// layer; it is not checked against that figure.
//
// The network sizes follow the document's evaluation; kernel sizes of setup B
// and the single MAC of the FCNN output layer are this design's choices.
module tb_workloads;
  import ann_pkg::*;
  import ann_model_pkg::*;

  int c[4], f[4], lat[4], itv[4];
  bit d[4];
  int checks = 0, failures = 0;

  ann_bench #(.NET(fcnn(2, 8)), .NL(2), .DIN0(FCNN_IN), .RUNS(6)) b_fc2
    (.checks(c[0]), .failures(f[0]), .latency(lat[0]), .interval(itv[0]), .done(d[0]));
  ann_bench #(.NET(fcnn(3, 8)), .NL(3), .DIN0(FCNN_IN), .RUNS(6)) b_fc3
    (.checks(c[1]), .failures(f[1]), .latency(lat[1]), .interval(itv[1]), .done(d[1]));
  ann_bench #(.NET(fcnn(4, 8)), .NL(4), .DIN0(FCNN_IN), .RUNS(6)) b_fc4
    (.checks(c[2]), .failures(f[2]), .latency(lat[2]), .interval(itv[2]), .done(d[2]));
  ann_bench #(.NET(cnn_setup_b()), .NL(4), .DIN0(CNN_IN), .RUNS(2)) b_cnnb
    (.checks(c[3]), .failures(f[3]), .latency(lat[3]), .interval(itv[3]), .done(d[3]));

  initial begin
    #5ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    string names[4] = '{"FCNN-2", "FCNN-3", "FCNN-4", "CNN-B"};
    wait (d[0] && d[1] && d[2] && d[3]);
    for (int i = 0; i < 4; i++) begin
      $display("%-7s latency %6d cycles, interval %6d cycles, checks %0d, failures %0d",
               names[i], lat[i], itv[i], c[i], f[i]);
      checks += c[i];
      failures += f[i];
    end
    for (int i = 0; i < 4; i++) begin
      int e;
      case (i)
        0: e = model_latency(fcnn(2, 8), 2, 1, 1, 16);
        1: e = model_latency(fcnn(3, 8), 3, 1, 1, 16);
        2: e = model_latency(fcnn(4, 8), 4, 1, 1, 16);
        default: e = model_latency(cnn_setup_b(), 4, 20, 20, 1);
      endcase
      checks++;
      if (lat[i] != e) begin
        failures++;
        $display("FAIL: %s latency %0d, timing model %0d", names[i], lat[i], e);
      end
    end
    $display("reference implementation: about 100 cycles per elaboration at 8 MACs/layer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
