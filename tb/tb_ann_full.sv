// tb_ann_full: ann_top at its default configuration (convolutional setup
// A: 20x20x1 input, 5x5 convolution with 10 neurons on 5 MACs, 2x2/2
// max-pooling, fully-connected output layer with 10 neurons on 5 MACs).
// Loads random weights, runs two complete inferences back to back and
// compares all ten outputs of each with the reference model. It also
// checks the latency of the first inference against the cycle count
// worked out from the layer timing:
//   conv : 400 input words, then 2 groups x 256 positions x 26 cycles
//   pool : 2562 cycles to copy 2560 words, 640 outputs x 4 cycles
//   fc   : 642 cycles to copy 640 words, 2 groups x 1 position x 641 cycles
// plus the fixed start, read and save overheads of each stage.
//
// The network is the document's setup A with this design's assumed kernel
// and pooling sizes; the expected latency comes from this design's timing.
module tb_ann_full;
  import ann_pkg::*;

  localparam int OAW = clog2_1(10);

  logic clk = 1'b0;
  logic rst_n, w_valid, w_ready, loaded, in_valid, in_ready;
  logic out_full, out_rd_en, out_release;
  wgt_t w_data;
  data_t in_data, out_rd_data;
  logic [OAW-1:0] out_rd_addr;
  int checks, failures, latency, interval;
  bit done;
  int lat_fail = 0;

  ann_top dut (.*);
  ann_driver #(.RUNS(2), .HOLD(0)) drv (.*);

  always #5 clk = ~clk;

  // expected first-inference latency in clock edges, from the edge that
  // accepts the first input word to the edge that raises the last layer's
  // output flag. Per FC/conv layer: 1 start edge, G*P*(K+1) issue cycles,
  // memory read, MAC result, then one save cycle per neuron of the last
  // group. Per max-pooling layer: 1 start edge, Hout*Wout*D*Fh*Fw issue
  // cycles, max result, output write. Per memory-to-memory copy: N+2.
  localparam int T_CONV = 399 + 1 + 2 * 256 * 26 + 2 + 5;
  localparam int T_POOL = (2560 + 2) + 1 + 640 * 4 + 2;
  localparam int T_FC   = (640 + 2) + 1 + 2 * 1 * 641 + 2 + 5;
  localparam int T_EXP  = T_CONV + T_POOL + T_FC;

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wait (done);
    $display("latency %0d cycles (expected %0d), interval %0d cycles", latency, T_EXP, interval);
    if (latency != T_EXP) lat_fail = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + lat_fail);
    $finish;
  end
endmodule
