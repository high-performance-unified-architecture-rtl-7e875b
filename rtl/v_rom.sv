// v_rom: inverse-quantization scaling factor ROM.
//
// Holds the 6x3 five-bit constants v(QP%6, n) of the H.264 rescaling
// process, kept in quant_pkg::v_const and addressed like mf_rom (n = 0 both
// indexes even, 1 both odd, 2 mixed). Combinational; out-of-range addresses return 0
// (this design's choice).
module v_rom
  import quant_pkg::*;
(
  input  logic [2:0]     qp_mod6,
  input  logic [1:0]     n,
  output logic [V_W-1:0] v
);

  assign v = V_W'(v_const(int'(n), int'(qp_mod6)));

endmodule
