// tb_mac_unit: self-checking test of mac_unit. Feeds random sequences of
// 1 to 20 signed 9-bit products (with random idle cycles in between),
// framed by first/last, and checks result against a sum computed here,
// that result_valid pulses exactly one cycle after the last term, and that
// result holds while the next sum is being accumulated.
//
// The multiply-accumulate follows the document; the first/last framing and
// the 32-bit accumulator are this design's choices.
module tb_mac_unit;
  logic clk = 1'b0, rst_n = 1'b0;
  logic valid = 1'b0, first = 1'b0, last = 1'b0;
  logic signed [8:0] x = '0, w = '0;
  logic signed [31:0] result;
  logic result_valid;
  int checks = 0, failures = 0;

  mac_unit #(.DW(9), .WW(9), .AW(32)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint expected, prev;
    prev = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      int n;
      n = 1 + int'($urandom % 20);
      expected = 0;
      for (int k = 0; k < n; k++) begin
        valid = 1'b1; first = (k == 0); last = (k == n - 1);
        x = 9'($urandom); w = 9'($urandom);
        if (t == 0) begin x = -9'sd256; w = -9'sd256; end
        expected += longint'(x) * longint'(w);
        @(negedge clk);
        // the previous result stays valid while accumulating
        if (k < n - 1 && t > 0) begin
          checks++;
          if (longint'(result) != prev) failures++;
        end
        checks++;
        if (result_valid !== (k == n - 1)) begin
          failures++;
          $display("result_valid wrong at term %0d of %0d", k, n);
        end
        if ($urandom % 4 == 0) begin
          valid = 1'b0; first = 1'b0; last = 1'b0; x = 9'($urandom);
          @(negedge clk);
        end
      end
      valid = 1'b0; first = 1'b0; last = 1'b0;
      checks++;
      if (longint'(result) != expected) begin
        failures++;
        $display("sum %0d got %0d expected %0d", t, result, expected);
      end
      prev = expected;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
