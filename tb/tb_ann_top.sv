// tb_ann_top: end-to-end test of ann_top on a reduced network that uses
// every layer type and mechanism:
//   layer 0  convolution, 6x6x1 input, 3x3 field, stride 1, 1-pixel zero
//            padding, 4 neurons on 3 MACs (two neuron groups, the second
//            one partly used), ReLU
//   layer 1  max-pooling 2x2, stride 2 -> 3x3x4
//   layer 2  fully-connected, 4 neurons on 2 MACs, ReLU
//   layer 3  fully-connected, 12 neurons on 6 MACs, linear; its 5-cycle
//            iterations are shorter than the 6 cycles needed to save the
//            results, so its elaboration stage stalls
// Four input volumes are sent back to back and each result is held for 1500
// cycles before it is read, so full output memories push back through the
// chain. Every output is compared with the reference model. The testbench
// counts how often each mechanism happened and fails if one never did:
// weight loading, zero padding, neuron-group change, save stall,
// back-pressure (an elaboration stage waiting on a full output memory, a
// loader waiting on a full input memory) and layers elaborating at the
// same time (pipelining).
//
// The reduced network is a test choice; the mechanisms counted are those
// the document describes (stages, flags, parallel MACs, padding) plus this
// design's stall rule.
module tb_ann_top;
  import ann_pkg::*;

  function automatic net_cfg_t test_net();
    net_cfg_t n;
    n    = '0;
    n[0] = mk_layer(L_CONV, 4, 3, 3, 1, 1, ACT_RELU);
    n[1] = mk_layer(L_POOL, 0, 1, 2, 2, 0, ACT_LINEAR);
    n[2] = mk_layer(L_FC,   4, 2, 1, 1, 0, ACT_RELU);
    n[3] = mk_layer(L_FC,  12, 6, 1, 1, 0, ACT_LINEAR);
    return n;
  endfunction

  localparam net_cfg_t NET  = test_net();
  localparam int       NL   = 4;
  localparam dims_t    DIN0 = '{h: 16'd6, w: 16'd6, d: 16'd1};
  localparam int       OAW  = clog2_1(12);

  logic clk = 1'b0;
  logic rst_n, w_valid, w_ready, loaded, in_valid, in_ready;
  logic out_full, out_rd_en, out_release;
  wgt_t w_data;
  data_t in_data, out_rd_data;
  logic [OAW-1:0] out_rd_addr;
  int checks, failures, latency, interval;
  bit done;

  ann_top #(.NET(NET), .NL(NL), .DIN0(DIN0)) dut (.*);
  ann_driver #(.NET(NET), .NL(NL), .DIN0(DIN0), .RUNS(4), .HOLD(1500)) drv (.*);

  always #5 clk = ~clk;

  // mechanism counters
  int n_wload = 0, n_pad = 0, n_group = 0, n_stall = 0, n_bp_elab = 0, n_bp_load = 0;
  int n_overlap = 0;
  int mech_fail = 0;

  always_ff @(posedge clk) if (rst_n) begin
    int running;
    if (dut.u_wload.w_valid && dut.u_wload.w_ready) n_wload <= n_wload + 1;
    if (dut.g_layer[0].g_mac.u_layer.issue && dut.g_layer[0].g_mac.u_layer.issue_pad)
      n_pad <= n_pad + 1;
    if (dut.g_layer[0].g_mac.u_layer.issue && dut.g_layer[0].g_mac.u_layer.issue_last &&
        dut.g_layer[0].g_mac.u_layer.ox == 5 && dut.g_layer[0].g_mac.u_layer.oy == 5 &&
        dut.g_layer[0].g_mac.u_layer.grp == 0)
      n_group <= n_group + 1;
    if (dut.g_layer[3].g_mac.u_layer.stall) n_stall <= n_stall + 1;
    if (dut.g_layer[3].g_mac.u_layer.in_full && dut.g_layer[3].g_mac.u_layer.out_full &&
        !dut.g_layer[3].g_mac.u_layer.issue)
      n_bp_elab <= n_bp_elab + 1;
    if (dut.lo_full[1] && dut.g_layer[2].g_mac.u_layer.in_full) n_bp_load <= n_bp_load + 1;
    running = 0;
    if (dut.g_layer[0].g_mac.u_layer.issue) running++;
    if (dut.g_layer[1].g_pool.u_layer.issue) running++;
    if (dut.g_layer[2].g_mac.u_layer.issue) running++;
    if (dut.g_layer[3].g_mac.u_layer.issue) running++;
    if (running >= 2) n_overlap <= n_overlap + 1;
  end

  task automatic need(int n, string what);
    $display("%-40s %0d", what, n);
    if (n == 0) begin
      mech_fail++;
      $display("FAIL: %s never happened", what);
    end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wait (done);
    need(n_wload,   "weight words loaded");
    need(n_pad,     "padded receptive-field terms");
    need(n_group,   "neuron-group changes");
    need(n_stall,   "save-stage stall cycles");
    need(n_bp_elab, "elaboration waiting on full output");
    need(n_bp_load, "loader waiting on full input");
    need(n_overlap, "cycles with >= 2 layers elaborating");
    $display("latency %0d cycles, interval %0d cycles", latency, interval);
    $display("TB_RESULT checks=%0d failures=%0d", checks + 7, failures + mech_fail);
    $finish;
  end
endmodule
