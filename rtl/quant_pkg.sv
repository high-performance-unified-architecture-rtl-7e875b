// quant_pkg: types and widths shared by the unified H.264/AVC quantizer.
//
// The quantizer handles one coefficient per clock. A coefficient carries an
// opcode (forward or inverse quantization) and a transform type that selects
// the DC or AC variant of the formulas. The T_TYPE codes follow the block-eta
// truth table: 00 is the 2x2 chroma DC Hadamard, 01 the 4x4 luma DC Hadamard,
// 10 and 11 are core-transform (AC) coefficients, which are treated alike.
package quant_pkg;

  typedef enum logic {
    OP_FQ = 1'b0,   // forward quantization, Z = (W*MF + phi) >> qbits
    OP_IQ = 1'b1    // inverse quantization (rescaling), W = (Z*V + phi) <</>> eps
  } op_e;

  typedef enum logic [1:0] {
    TT_H2X2 = 2'b00,   // chroma DC, 2x2 Hadamard
    TT_H4X4 = 2'b01,   // luma DC, 4x4 Hadamard
    TT_CORE = 2'b10,   // core transform coefficient
    TT_CORE2 = 2'b11   // core transform coefficient (same treatment)
  } ttype_e;

  localparam int COEF_W  = 16;  // input and output coefficient width
  localparam int SIGMA_W = 15;  // signed scale factor width (14-bit MF + sign)
  localparam int PROD_W  = 31;  // product / rounding adder width
  localparam int SHIFT_W = 32;  // barrel shifter width
  localparam int MF_W    = 14;
  localparam int V_W     = 5;
  localparam int F_W     = 22;  // floor(2^23/3) = 2796202 needs 22 bits
  localparam int PHI_W   = 23;  // f << 1

  // m(QP%6, n) of the forward quantizer; n = 0 for positions (even, even),
  // 1 for (odd, odd), 2 for mixed positions. 0 outside the table.
  function automatic int mf_const(int n, int q);
    unique case (n * 8 + q)
      0:  return 13107;   1: return 11916;   2: return 10082;
      3:  return 9362;    4: return 8192;    5: return 7282;
      8:  return 5243;    9: return 4660;   10: return 4194;
      11: return 3647;   12: return 3355;   13: return 2893;
      16: return 8066;   17: return 7490;   18: return 6554;
      19: return 5825;   20: return 5243;   21: return 4559;
      default: return 0;
    endcase
  endfunction

  // v(QP%6, n) of the inverse quantizer, same indexing
  function automatic int v_const(int n, int q);
    unique case (n * 8 + q)
      0:  return 10;   1: return 11;   2: return 13;
      3:  return 14;   4: return 16;   5: return 18;
      8:  return 16;   9: return 18;  10: return 20;
      11: return 23;  12: return 25;  13: return 29;
      16: return 13;  17: return 14;  18: return 16;
      19: return 18;  20: return 20;  21: return 23;
      default: return 0;
    endcase
  endfunction

  // true for the two DC (Hadamard) transform types
  function automatic logic is_dc(ttype_e t);
    return t == TT_H2X2 || t == TT_H4X4;
  endfunction

endpackage
