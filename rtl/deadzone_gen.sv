// deadzone_gen: rounding value phi added before the final shift.
//
// Forward quantization: phi = (f >> beta) << h, where f is the INTRA dead
// zone 2^(15+QP/6)/3 from f_rom, beta = 0 for INTRA and 1 for INTER blocks
// (giving 2^(15+QP/6)/6), and h = 1 for DC coefficients, whose shift is one
// bit longer. Inverse quantization: phi is 2 for the 4x4 luma DC with QP < 6,
// 1 for it with 6 <= QP < 12, and 0 for everything else, i.e. the rounding
// term 2^(1-QP/6) of the right-shifted luma DC rescaling. Combinational.
module deadzone_gen
  import quant_pkg::*;
(
  input  op_e             op,
  input  ttype_e          ttype,
  input  logic            intra,
  input  logic            qp_lt12,
  input  logic            qp_lt6,
  input  logic [F_W-1:0]  f,
  output logic [PHI_W-1:0] phi
);

  logic [F_W-1:0] f_beta;

  always_comb begin
    f_beta = intra ? f : (f >> 1);
    if (op == OP_FQ)
      phi = is_dc(ttype) ? {f_beta, 1'b0} : {1'b0, f_beta};
    else if (ttype == TT_H4X4 && qp_lt6)
      phi = PHI_W'(2);
    else if (ttype == TT_H4X4 && qp_lt12)
      phi = PHI_W'(1);
    else
      phi = '0;
  end

endmodule
