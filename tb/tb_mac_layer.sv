// tb_mac_layer: self-checking test of mac_layer in two configurations.
//  A: convolution, 5x5x2 input, 3 neurons on 2 MACs (so the second neuron
//     group is only half used), 3x3 receptive field, stride 2, one pixel
//     of zero padding on every side, ReLU; input from the stream port.
//     Checks every output against the reference model, the cycle count
//     from the last input word to out_full, and that a second input waits
//     (back-pressure) while the output memory is still full.
//  B: fully-connected, 3 inputs, 5 neurons on 4 MACs, linear activation;
//     input from a model of the previous layer's output memory. Its
//     iterations (4 cycles) are shorter than the 4 cycles needed to save
//     the results, so the elaboration stage must stall; the stall cycles
//     are counted and must be non-zero.
//
// The layer geometry and arithmetic follow the document; the checked cycle
// count, weight layout and stall are this design's choices.
module tb_mac_layer;
  import ann_pkg::*;
  import ann_model_pkg::*;

  localparam layer_cfg_t CA = '{kind: L_CONV, neurons: 16'd3, macs: 8'd2, fh: 8'd3, fw: 8'd3,
                                stv: 8'd2, sth: 8'd2, pt: 8'd1, pb: 8'd1, pl: 8'd1, pr: 8'd1,
                                act: ACT_RELU};
  localparam dims_t DA = '{h: 16'd5, w: 16'd5, d: 16'd2};
  localparam layer_cfg_t CB = mk_layer(L_FC, 5, 4, 1, 1, 0, ACT_LINEAR);
  localparam dims_t DB = '{h: 16'd1, w: 16'd1, d: 16'd3};

  localparam int NIA = 50, NOA = 27, NWA = 19, GA = 2, PA = 9;
  localparam int NIB = 3,  NOB = 5,  NWB = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  // ---------------------------------------------------------------- DUT A
  logic        a_s_valid = 1'b0, a_s_ready, a_out_full, a_out_rd_en = 1'b0, a_out_release = 1'b0;
  data_t       a_s_data = '0, a_out_rd_data;
  logic [4:0]  a_out_rd_addr = '0;
  logic        a_wl_en = 1'b0;
  logic [0:0]  a_wl_mac = '0;
  logic [5:0]  a_wl_addr = '0;
  wgt_t        a_wl_data = '0;

  mac_layer #(.CFG(CA), .DIN(DA), .STREAM_SRC(1'b1)) dut_a (
    .clk, .rst_n,
    .s_valid(a_s_valid), .s_data(a_s_data), .s_ready(a_s_ready),
    .src_full(1'b0), .src_rd_en(), .src_rd_addr(), .src_rd_data('0), .src_release(),
    .wl_en(a_wl_en), .wl_mac(a_wl_mac), .wl_addr(a_wl_addr), .wl_data(a_wl_data),
    .out_full(a_out_full), .out_rd_en(a_out_rd_en), .out_rd_addr(a_out_rd_addr),
    .out_rd_data(a_out_rd_data), .out_release(a_out_release)
  );

  // ---------------------------------------------------------------- DUT B
  logic        b_src_full = 1'b0, b_src_rd_en, b_src_release;
  logic [1:0]  b_src_rd_addr;
  data_t       b_src_rd_data;
  data_t       b_src_mem [NIB];
  logic        b_out_full, b_out_rd_en = 1'b0, b_out_release = 1'b0;
  logic [2:0]  b_out_rd_addr = '0;
  data_t       b_out_rd_data;
  logic        b_wl_en = 1'b0;
  logic [1:0]  b_wl_mac = '0;
  logic [2:0]  b_wl_addr = '0;
  wgt_t        b_wl_data = '0;
  int          b_stalls = 0;

  mac_layer #(.CFG(CB), .DIN(DB), .STREAM_SRC(1'b0)) dut_b (
    .clk, .rst_n,
    .s_valid(1'b0), .s_data('0), .s_ready(),
    .src_full(b_src_full), .src_rd_en(b_src_rd_en), .src_rd_addr(b_src_rd_addr),
    .src_rd_data(b_src_rd_data), .src_release(b_src_release),
    .wl_en(b_wl_en), .wl_mac(b_wl_mac), .wl_addr(b_wl_addr), .wl_data(b_wl_data),
    .out_full(b_out_full), .out_rd_en(b_out_rd_en), .out_rd_addr(b_out_rd_addr),
    .out_rd_data(b_out_rd_data), .out_release(b_out_release)
  );

  always_ff @(posedge clk) begin
    if (b_src_rd_en) b_src_rd_data <= b_src_mem[b_src_rd_addr];
    if (rst_n && dut_b.stall) b_stalls <= b_stalls + 1;
  end

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  ivec_t xa, xa2, wa, ya, ya2, xb, wb, yb;

  task automatic load_a_weights();
    for (int s = 0; s < 3; s++)
      for (int k = 0; k < NWA; k++) begin
        a_wl_en = 1'b1; a_wl_mac = 1'(s % 2); a_wl_addr = 6'((s / 2) * NWA + k);
        a_wl_data = wgt_t'(wa[s * NWA + k]);
        @(negedge clk);
      end
    a_wl_en = 1'b0;
  endtask

  task automatic load_b_weights();
    for (int s = 0; s < 5; s++)
      for (int k = 0; k < NWB; k++) begin
        b_wl_en = 1'b1; b_wl_mac = 2'(s % 4); b_wl_addr = 3'((s / 4) * NWB + k);
        b_wl_data = wgt_t'(wb[s * NWB + k]);
        @(negedge clk);
      end
    b_wl_en = 1'b0;
  endtask

  task automatic stream_a(ivec_t x);
    int k;
    bit acc;
    k = 0;
    while (k < NIA) begin
      a_s_valid = 1'b1; a_s_data = data_t'(x[k]);
      acc = a_s_ready;
      @(negedge clk);
      if (acc) k++;
    end
    a_s_valid = 1'b0;
  endtask

  task automatic read_a(ivec_t y, string tag);
    for (int a = 0; a < NOA; a++) begin
      a_out_rd_en = 1'b1; a_out_rd_addr = 5'(a);
      @(negedge clk);
      chk(int'(a_out_rd_data) == y[a],
          $sformatf("%s out %0d got %0d expected %0d", tag, a, a_out_rd_data, y[a]));
    end
    a_out_rd_en = 1'b0;
  endtask

  initial begin
    int cyc, expected_cyc;
    xa = new[NIA]; xa2 = new[NIA]; wa = new[3 * NWA];
    xb = new[NIB]; wb = new[5 * NWB];
    foreach (xa[i]) begin xa[i] = rnd_val(-64, 64); xa2[i] = rnd_val(-64, 64); end
    foreach (wa[i]) wa[i] = rnd_val(-40, 40);
    foreach (xb[i]) xb[i] = rnd_val(-100, 100);
    foreach (wb[i]) wb[i] = rnd_val(-128, 127);
    ya  = model_layer(CA, 5, 5, 2, xa, wa);
    ya2 = model_layer(CA, 5, 5, 2, xa2, wa);
    yb  = model_layer(CB, 1, 1, 3, xb, wb);

    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    load_a_weights();
    load_b_weights();

    // ---------------- A: first volume, with cycle count
    // send all but the last word, then time from the last word
    for (int k = 0; k < NIA - 1; k++) begin
      a_s_valid = 1'b1; a_s_data = data_t'(xa[k]);
      @(negedge clk);
    end
    a_s_data = data_t'(xa[NIA - 1]);
    @(negedge clk);
    a_s_valid = 1'b0;
    cyc = 0;
    while (!a_out_full) begin @(negedge clk); cyc++; end
    // counted in clock edges after the one that accepted the last word:
    // one edge to start, bias + 18 inputs per iteration for 2 groups x 9
    // positions, memory read, MAC result, save of the last group's single
    // neuron (which also raises the flag)
    expected_cyc = 1 + GA * PA * NWA + 3;
    chk(cyc == expected_cyc, $sformatf("A latency %0d cycles, expected %0d", cyc, expected_cyc));
    read_a(ya, "A1");

    // ---------------- A: second volume while the output memory is full
    stream_a(xa2);
    repeat (400) @(negedge clk);
    chk(a_out_full && !dut_a.v1 && !dut_a.issue, "A elaboration waits for the output memory");
    read_a(ya, "A1 kept");
    a_out_release = 1'b1;
    @(negedge clk);
    a_out_release = 1'b0;
    cyc = 0;
    while (!a_out_full) begin @(negedge clk); cyc++; end
    read_a(ya2, "A2");

    // ---------------- B: from a memory source
    foreach (xb[i]) b_src_mem[i] = data_t'(xb[i]);
    b_src_full = 1'b1;
    while (!b_src_release) @(negedge clk);
    b_src_full = 1'b0;
    while (!b_out_full) @(negedge clk);
    for (int a = 0; a < NOB; a++) begin
      b_out_rd_en = 1'b1; b_out_rd_addr = 3'(a);
      @(negedge clk);
      chk(int'(b_out_rd_data) == yb[a],
          $sformatf("B out %0d got %0d expected %0d", a, b_out_rd_data, yb[a]));
    end
    b_out_rd_en = 1'b0;
    chk(b_stalls > 0, "B elaboration stalled for the save stage");
    $display("B stall cycles: %0d", b_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
