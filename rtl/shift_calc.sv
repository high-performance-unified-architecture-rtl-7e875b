// shift_calc: amount and direction of the final barrel shift (epsilon).
//
// Forward quantization shifts right by 15 + QP/6 + h, with h = 1 for the two
// DC transforms. Inverse quantization shifts by QP/6 - tau (tau = 2 for the
// 4x4 luma DC, 1 for the 2x2 chroma DC, 0 otherwise): left when that is
// positive or zero, right by tau - QP/6 when it is negative. Block eta gives
// the direction, and one small adder computes the magnitude for all cases:
// its operands are QP/6 and a constant (15+h or tau), with the constant and
// QP/6 swapped or negated as eta and the opcode require. The document sizes
// this adder at 4 bits; 5 are used here so that 15+8+1 = 24 fits.
// Combinational.
module shift_calc
  import quant_pkg::*;
(
  input  op_e        op,
  input  ttype_e     ttype,
  input  logic [3:0] qp_div6,
  input  logic       qp_lt12,
  input  logic       qp_lt6,
  output logic [4:0] shamt,
  output logic       shr
);

  logic       eta;
  logic [4:0] konst;       // 15 + h for forward, tau for inverse
  logic [4:0] opa, opb;    // adder operands after the swap
  logic       sub;

  eta_unit u_eta (
    .op      (op),
    .ttype   (ttype),
    .qp_lt12 (qp_lt12),
    .qp_lt6  (qp_lt6),
    .eta     (eta)
  );

  always_comb begin
    if (op == OP_FQ)           konst = is_dc(ttype) ? 5'd16 : 5'd15;
    else if (ttype == TT_H4X4) konst = 5'd2;
    else if (ttype == TT_H2X2) konst = 5'd1;
    else                       konst = 5'd0;

    // forward: konst + QP/6; inverse right: konst - QP/6; inverse left: QP/6 - konst
    sub = (op == OP_IQ);
    if (op == OP_IQ && !eta) begin
      opa = {1'b0, qp_div6};
      opb = konst;
    end else begin
      opa = konst;
      opb = {1'b0, qp_div6};
    end
    shamt = sub ? opa - opb : opa + opb;
    shr   = eta;
  end

endmodule
