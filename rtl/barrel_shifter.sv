// barrel_shifter: 32-bit bidirectional barrel shifter of phase D.
//
// Shifts a signed 32-bit value right arithmetically (shr = 1) or left
// logically (shr = 0) by 0..31 bits. Built as five logarithmic stages, each a
// row of 2:1 multiplexers shifting by 1, 2, 4, 8 or 16 bits under one bit of
// the shift amount; the stage structure is this design's choice.
// Combinational.
module barrel_shifter
  import quant_pkg::*;
(
  input  logic signed [SHIFT_W-1:0] din,
  input  logic [4:0]                shamt,
  input  logic                      shr,
  output logic signed [SHIFT_W-1:0] dout
);

  logic signed [SHIFT_W-1:0] stage [6];

  always_comb begin
    stage[0] = din;
    for (int i = 0; i < 5; i++) begin
      if (!shamt[i])  stage[i+1] = stage[i];
      else if (shr)   stage[i+1] = stage[i] >>> (1 << i);
      else            stage[i+1] = stage[i] <<  (1 << i);
    end
    dout = stage[5];
  end

endmodule
