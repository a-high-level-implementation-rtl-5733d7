// tb_max_unit: self-checking test of max_unit. Feeds random pools of 1 to
// 9 signed 9-bit values framed by first/last and checks that result is
// their maximum and that result_valid pulses one cycle after last.
//
// The compare-with-accumulator behaviour follows the document; the framing
// signals are this design's choice.
module tb_max_unit;
  logic clk = 1'b0, rst_n = 1'b0;
  logic valid = 1'b0, first = 1'b0, last = 1'b0;
  logic signed [8:0] x = '0, result;
  logic result_valid;
  int checks = 0, failures = 0;

  max_unit #(.DW(9)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      int n, m;
      n = 1 + int'($urandom % 9);
      m = -1000;
      for (int k = 0; k < n; k++) begin
        valid = 1'b1; first = (k == 0); last = (k == n - 1);
        x = 9'($urandom);
        if (t % 3 == 0) x = -9'sd100 - 9'($urandom % 50); // all negative pools
        if (int'(x) > m) m = int'(x);
        @(negedge clk);
        checks++;
        if (result_valid !== (k == n - 1)) failures++;
      end
      valid = 1'b0; first = 1'b0; last = 1'b0;
      checks++;
      if (int'(result) != m) begin
        failures++;
        $display("pool %0d got %0d expected %0d", t, result, m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
