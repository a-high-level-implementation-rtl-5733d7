// max_unit: compare-and-hold accumulator of a max-pooling layer.
//
// Each valid input is compared with the accumulator and replaces it when
// it is greater; the first input of a pool (first high) is loaded
// unconditionally. On the last input of a pool (last high) the maximum is
// copied to result and result_valid pulses one cycle later.
// The comparison with an accumulator follows the document; the first/last
// framing signals are this design's choice.
module max_unit #(
  parameter int DW = 9
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 valid,
  input  logic                 first,
  input  logic                 last,
  input  logic signed [DW-1:0] x,
  output logic signed [DW-1:0] result,
  output logic                 result_valid
);

  logic signed [DW-1:0] acc, nxt;

  assign nxt = (first || x > acc) ? x : acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc          <= '0;
      result       <= '0;
      result_valid <= 1'b0;
    end else begin
      result_valid <= valid && last;
      if (valid) begin
        acc <= nxt;
        if (last) result <= nxt;
      end
    end
  end

endmodule
