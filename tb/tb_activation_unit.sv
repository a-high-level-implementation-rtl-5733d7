// tb_activation_unit: self-checking test of activation_unit with ReLU and
// with the linear function. Drives random and corner-case sums with 10
// fractional bits and compares the 9-bit, 5-fractional-bit outputs with
// values computed here (shift by 5, ReLU, saturation to [-256, 255]).
//
// ReLU is the document's activation; the expected rounding and saturation
// are those this design chose.
module tb_activation_unit;
  import ann_pkg::*;
  logic signed [31:0] z;
  logic signed [8:0]  y_relu, y_lin;
  int checks = 0, failures = 0;

  activation_unit #(.ACT(ACT_RELU),   .IW(32), .IFB(10), .OW(9), .OFB(5)) u_relu (.z, .y(y_relu));
  activation_unit #(.ACT(ACT_LINEAR), .IW(32), .IFB(10), .OW(9), .OFB(5)) u_lin  (.z, .y(y_lin));

  function automatic int ref_act(longint v, bit relu);
    longint s;
    s = v >>> 5;
    if (relu && s < 0) s = 0;
    if (s > 255) s = 255;
    if (s < -256) s = -256;
    return int'(s);
  endfunction

  task automatic check(longint v);
    z = 32'(v);
    #1;
    checks += 2;
    if (int'(y_relu) != ref_act(v, 1'b1)) begin
      failures++;
      $display("relu z=%0d got %0d expected %0d", v, y_relu, ref_act(v, 1'b1));
    end
    if (int'(y_lin) != ref_act(v, 1'b0)) begin
      failures++;
      $display("linear z=%0d got %0d expected %0d", v, y_lin, ref_act(v, 1'b0));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0); check(31); check(32); check(-1); check(-32); check(-33);
    check(255 * 32); check(256 * 32); check(-256 * 32); check(-257 * 32);
    check(2147483647); check(-64'sd2147483648);
    for (int i = 0; i < 500; i++) check(longint'($signed($urandom)) >>> ($urandom % 24));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
