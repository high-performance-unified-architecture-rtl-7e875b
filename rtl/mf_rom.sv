// mf_rom: forward-quantization multiplication factor ROM.
//
// Holds the 6x3 constants m(QP%6, n) of the H.264 forward quantizer, kept
// in quant_pkg::mf_const: n = 0 for positions with both indexes even, n = 1
// both odd, n = 2 mixed. Values are the standard's 14-bit integers.
// Combinational; addresses outside the table (QP%6 > 5 or n = 3) return 0,
// which is this design's choice.
module mf_rom
  import quant_pkg::*;
(
  input  logic [2:0]      qp_mod6,
  input  logic [1:0]      n,
  output logic [MF_W-1:0] mf
);

  assign mf = MF_W'(mf_const(int'(n), int'(qp_mod6)));

endmodule
