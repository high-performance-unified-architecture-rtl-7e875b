// f_rom: dead-zone offset ROM of the forward quantizer.
//
// Returns f = floor(2^(15 + QP/6) / 3), the rounding offset of an INTRA
// block, for QP/6 = 0..8. The INTER offset 2^(15+QP/6)/6 is derived from it
// by one right shift in deadzone_gen, so only one table is stored. Values are
// those of the H.264 reference encoder; the table is computed at elaboration.
// Indexes above 8 return 0. Combinational.
module f_rom (
  input  logic [3:0]  qp_div6,
  output logic [21:0] f
);

  logic [21:0] rom [16];
  always_comb begin
    for (int k = 0; k < 16; k++)
      rom[k] = (k <= 8) ? 22'((64'd1 << (15 + k)) / 64'd3) : '0;
  end

  assign f = rom[qp_div6];

endmodule
