// signed_mult: generic 16 x 15-bit signed multiplier.
//
// Multiplies the signed input coefficient by the signed scale factor (a
// positive MF or V constant with a zero sign bit) and returns the full 31-bit
// product. It is written as a plain product so that synthesis can map it to a
// DSP slice or its own multiplier; this is the multiplier the document uses
// for FPGA implementations. Combinational.
module signed_mult
  import quant_pkg::*;
(
  input  logic signed [COEF_W-1:0]  a,
  input  logic signed [SIGMA_W-1:0] b,
  output logic signed [PROD_W-1:0]  p
);

  assign p = a * b;

endmodule
