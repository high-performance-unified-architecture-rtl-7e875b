// eta_unit: block eta, the direction of the final shift.
//
// Forward quantization always ends with a right shift (eta = 1). Inverse
// quantization shifts right only for the 2x2 chroma DC with QP < 6 and for
// the 4x4 luma DC with QP < 12; every other case shifts left (eta = 0). This
// lets a single small adder produce the shift amount for both operations.
// The truth table is the document's; the module is combinational.
module eta_unit
  import quant_pkg::*;
(
  input  op_e    op,
  input  ttype_e ttype,
  input  logic   qp_lt12,
  input  logic   qp_lt6,
  output logic   eta
);

  always_comb begin
    if (op == OP_FQ) eta = 1'b1;
    else begin
      unique case (ttype)
        TT_H2X2: eta = qp_lt6;
        TT_H4X4: eta = qp_lt12;
        default: eta = 1'b0;
      endcase
    end
  end

endmodule
