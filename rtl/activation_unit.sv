// activation_unit: applies the layer's activation function to a MAC sum
// and brings it back to the data format.
//
// Input z carries IFB fractional bits (data plus weight fractional bits);
// it is shifted right by IFB-OFB (arithmetic shift, i.e. rounding towards
// minus infinity) and saturated to the signed OW-bit output format. With
// ACT = ACT_RELU the result is max(0, z), realised as a sign check; with
// ACT_LINEAR the value passes unchanged. Purely combinational.
// ReLU follows the document; truncation and saturation are this design's
// choices.
module activation_unit
  import ann_pkg::*;
#(
  parameter act_e ACT = ACT_RELU,
  parameter int   IW  = 32,
  parameter int   IFB = 10,
  parameter int   OW  = 9,
  parameter int   OFB = 5
) (
  input  logic signed [IW-1:0] z,
  output logic signed [OW-1:0] y
);

  localparam logic signed [IW-1:0] MAXV = IW'((1 <<< (OW - 1)) - 1);
  localparam logic signed [IW-1:0] MINV = -IW'(1 <<< (OW - 1));

  logic signed [IW-1:0] shifted, activated;

  always_comb begin
    shifted   = z >>> (IFB - OFB);
    activated = (ACT == ACT_RELU && shifted < 0) ? '0 : shifted;
    if (activated > MAXV)      y = MAXV[OW-1:0];
    else if (activated < MINV) y = MINV[OW-1:0];
    else                       y = activated[OW-1:0];
  end

endmodule
