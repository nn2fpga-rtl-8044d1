// dsp_pack2: two signed 8-bit products that share one operand, computed with
// a single multiplier as a DSP slice would (DSP packing).
//
// The two weights are packed into one wide operand, w1 * 2^18 + w0, and
// multiplied by the shared activation a. The low 18 bits of the product hold
// a*w0 in two's complement; the bits above hold a*w1 less the borrow that a
// negative low product takes from them, which is added back. The 18-bit
// offset leaves room for the 16-bit products without overlap. The document
// names the technique for 8-bit data and takes it from published vendor
// methods; the offset and the correction here are the standard ones for a
// 27 x 18 multiplier. Combinational.
module dsp_pack2
  import nn2fpga_pkg::*;
(
  input  act_t              a,
  input  wgt_t              w0,
  input  wgt_t              w1,
  output logic signed [15:0] p0,
  output logic signed [15:0] p1
);
  localparam int OFS = 18;

  logic signed [26:0] packed_w;
  logic signed [34:0] prod;
  logic signed [17:0] low;
  logic signed [34:0] high;

  always_comb begin
    packed_w = (27'(w1) <<< OFS) + 27'(w0);
    prod     = 35'(packed_w) * 35'(a);
    low      = prod[OFS-1:0];
    high     = (prod - 35'(low)) >>> OFS;
    p0       = low[15:0];
    p1       = high[15:0];
  end
endmodule
