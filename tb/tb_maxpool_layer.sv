// tb_maxpool_layer: self-checking test of maxpool_layer. Input 5x5x3
// from the stream port, 2x2 pool, stride 2, one row/column of zero padding
// at the bottom and right only (so Hout = Wout = 3 and the last row and
// column of pools include padding zeros). Values are mostly negative so a
// padded zero must win those pools. Checks every output against the
// reference model and the cycle count from the last input word to
// out_full: one start edge, Fh*Fw cycles per output, then the max unit
// result register and the output write that raises the flag.
//
// Pooling and its output size follow the document; the loop order and the
// checked latency are this design's choices.
module tb_maxpool_layer;
  import ann_pkg::*;
  import ann_model_pkg::*;

  localparam layer_cfg_t CP = '{kind: L_POOL, neurons: 16'd0, macs: 8'd1, fh: 8'd2, fw: 8'd2,
                                stv: 8'd2, sth: 8'd2, pt: 8'd0, pb: 8'd1, pl: 8'd0, pr: 8'd1,
                                act: ACT_LINEAR};
  localparam dims_t DP = '{h: 16'd5, w: 16'd5, d: 16'd3};
  localparam int NI = 75, NO = 27;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  logic        s_valid = 1'b0, s_ready, out_full, out_rd_en = 1'b0, out_release = 1'b0;
  data_t       s_data = '0, out_rd_data;
  logic [4:0]  out_rd_addr = '0;

  maxpool_layer #(.CFG(CP), .DIN(DP), .STREAM_SRC(1'b1)) dut (
    .clk, .rst_n, .s_valid, .s_data, .s_ready,
    .src_full(1'b0), .src_rd_en(), .src_rd_addr(), .src_rd_data('0), .src_release(),
    .out_full, .out_rd_en, .out_rd_addr, .out_rd_data, .out_release
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    ivec_t x, y;
    int cyc;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int r = 0; r < 2; r++) begin
      x = new[NI];
      foreach (x[i]) x[i] = (r == 0) ? rnd_val(-200, 20) : rnd_val(-256, 255);
      y = model_layer(CP, 5, 5, 3, x, x);
      for (int k = 0; k < NI; k++) begin
        s_valid = 1'b1; s_data = data_t'(x[k]);
        chk(s_ready, "s_ready while loading");
        @(negedge clk);
      end
      s_valid = 1'b0;
      cyc = 0;
      while (!out_full) begin @(negedge clk); cyc++; end
      chk(cyc == 1 + NO * 4 + 2, $sformatf("latency %0d expected %0d", cyc, 1 + NO * 4 + 2));
      for (int a = 0; a < NO; a++) begin
        out_rd_en = 1'b1; out_rd_addr = 5'(a);
        @(negedge clk);
        chk(int'(out_rd_data) == y[a], $sformatf("round %0d out %0d got %0d expected %0d",
                                                 r, a, out_rd_data, y[a]));
      end
      out_rd_en = 1'b0;
      out_release = 1'b1;
      @(negedge clk);
      out_release = 1'b0;
      chk(!out_full, "out_release clears out_full");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
