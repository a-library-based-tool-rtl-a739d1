// requant: output activation and rescaling of one accumulator value.
//
// The layer library offers a linear or a ReLU output activation. The
// accumulator holds sum(activation * weight) at full precision; weights are
// fixed-point numbers with SHIFT fractional bits, so the result is shifted
// right arithmetically by SHIFT (rounding towards minus infinity), the
// activation is applied and the value is saturated to the signed OW-bit
// activation format. The fixed-point format, the truncating shift and the
// saturation are choices of this design; the activations themselves follow
// the library description.
//
// Purely combinational: y follows acc in the same cycle.
module requant
  import dnn_pkg::*;
#(
  parameter int   AW    = 24,
  parameter int   OW    = 8,
  parameter int   SHIFT = 7,
  parameter act_e ACT   = ACT_RELU
) (
  input  logic signed [AW-1:0] acc,
  output logic signed [OW-1:0] y
);
  localparam logic signed [AW-1:0] MAXV = AW'((1 << (OW - 1)) - 1);
  localparam logic signed [AW-1:0] MINV = -AW'(1 << (OW - 1));

  logic signed [AW-1:0] shifted;

  always_comb begin
    shifted = acc >>> SHIFT;
    if (ACT == ACT_RELU && shifted < 0) shifted = '0;
    if (shifted > MAXV)      y = MAXV[OW-1:0];
    else if (shifted < MINV) y = MINV[OW-1:0];
    else                     y = shifted[OW-1:0];
  end
endmodule
