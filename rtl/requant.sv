// requant: maps an accumulator back to an activation with a power-of-two scale.
//
// out = clip(round(acc / 2^SHIFT), lo, hi), where rounding adds half an LSB
// before the arithmetic shift (round half up) and [lo, hi] is the signed
// OUT_W-bit range, or [0, 2^(OUT_W-1)-1] when RELU is set, which is the ReLU
// of the activation. Purely combinational. Power-of-two scales, symmetric
// quantisation and clipping follow the document; the rounding mode and the
// use of signed activations after ReLU are this design's choice.
module requant
  import nn2fpga_pkg::*;
#(
  parameter int IN_W  = ACC_W,
  parameter int OUT_W = ACT_W,
  parameter int SHIFT = 6,
  parameter bit RELU  = 1'b1
) (
  input  logic signed [IN_W-1:0]  acc,
  output logic signed [OUT_W-1:0] q
);
  localparam logic signed [IN_W:0] HI = (IN_W+1)'((1 << (OUT_W - 1)) - 1);
  localparam logic signed [IN_W:0] LO = RELU ? '0 : -(IN_W+1)'(1 << (OUT_W - 1));

  logic signed [IN_W:0] rounded, scaled;

  always_comb begin
    if (SHIFT > 0) rounded = (IN_W+1)'(acc) + ((IN_W+1)'(1) <<< (SHIFT - 1));
    else           rounded = (IN_W+1)'(acc);
    scaled = rounded >>> SHIFT;
    if (scaled > HI)      q = HI[OUT_W-1:0];
    else if (scaled < LO) q = LO[OUT_W-1:0];
    else                  q = scaled[OUT_W-1:0];
  end
endmodule
