// mac_unit: multiply-and-accumulate unit that forms one neuron's
// pre-activation value z = b + sum_j x_j * w_j.
//
// The bias is fed as an ordinary weight multiplied by the constant input
// 1.0, so every term of the sum takes one cycle: when valid is high the
// product x*w is added to the accumulator, or replaces it when first is
// high. When last is high the final sum is also copied to result and
// result_valid pulses one cycle later; result then holds its value until
// the next last, so the accumulator can start on the next neuron while
// the previous result is still being read out.
// x and w are signed fixed point (DW and WW bits); the sum keeps the full
// product precision (DFB + WFB fractional bits) in an AW-bit accumulator.
// Feeding the bias as a weight on input 1.0 is this design's choice.
module mac_unit #(
  parameter int DW = 9,
  parameter int WW = 9,
  parameter int AW = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 valid,
  input  logic                 first,
  input  logic                 last,
  input  logic signed [DW-1:0] x,
  input  logic signed [WW-1:0] w,
  output logic signed [AW-1:0] result,
  output logic                 result_valid
);

  logic signed [DW+WW-1:0] prod;
  logic signed [AW-1:0]    acc, sum;

  assign prod = x * w;
  assign sum  = (first ? AW'(0) : acc) + AW'(prod);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc          <= '0;
      result       <= '0;
      result_valid <= 1'b0;
    end else begin
      result_valid <= valid && last;
      if (valid) begin
        acc <= sum;
        if (last) result <= sum;
      end
    end
  end

endmodule
