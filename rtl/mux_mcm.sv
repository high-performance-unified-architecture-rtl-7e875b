// mux_mcm: multiplexed multiple-constant multiplier (ASIC multiplier option).
//
// The quantizer only ever multiplies a coefficient by one of 36 known
// constants: the 18 MF values for forward and the 18 V values for inverse
// quantization. Instead of a generic multiplier, each constant is written in
// canonical signed digit form (at most 8 non-zero digits for this set), and
// the product is the sum of 8 shifted copies of the input. For each of the 8
// terms a multiplexer, switched by the constant select (opcode, QP%6, n),
// chooses its shift, its sign or zero; an adder tree sums the terms.
// The digit tables are computed at elaboration from the MF and V tables.
// The idea of a multiplexed MCM is the document's; the digit form and the
// absence of shared partial sums are this design's simpler choice.
// Combinational; out-of-range selects give a zero product.
module mux_mcm
  import quant_pkg::*;
(
  input  logic signed [COEF_W-1:0] x,
  input  op_e                      op,
  input  logic [2:0]               qp_mod6,
  input  logic [1:0]               n,
  output logic signed [PROD_W-1:0] p
);

  localparam int K = 8;   // non-zero digits needed by the worst constant (13107)

  typedef struct packed {
    logic       nz;    // term is used
    logic       neg;   // term is subtracted
    logic [3:0] sh;    // left shift of the input
  } term_t;
  typedef term_t [K-1:0] terms_t;

  // canonical signed digit recoding of a positive constant
  function automatic terms_t csd(int c);
    terms_t t;
    int     k;
    int     r;
    t = '0;
    k = 0;
    for (int i = 0; i < 20; i++) begin
      if (c[0]) begin
        r = 2 - (c & 3);          // +1 or -1
        if (k < K) begin
          t[k].nz  = 1'b1;
          t[k].neg = (r < 0);
          t[k].sh  = 4'(i);
        end
        k = k + 1;
        c = c - r;
      end
      c = c >>> 1;
    end
    return t;
  endfunction

  // one constant-term entry per (opcode, n, QP%6): index op*18 + n*6 + QP%6
  terms_t tab [36];

  for (genvar g = 0; g < 36; g++) begin : g_const
    localparam int C = (g < 18) ? mf_const(g / 6, g % 6)
                                : v_const((g - 18) / 6, (g - 18) % 6);
    localparam terms_t T = csd(C);
    assign tab[g] = T;
  end

  terms_t                   sel;
  logic signed [PROD_W-1:0] xe;
  logic signed [PROD_W-1:0] part [K];

  always_comb begin
    if (qp_mod6 <= 3'd5 && n <= 2'd2) sel = tab[(op == OP_IQ ? 18 : 0) + 6 * int'(n) + int'(qp_mod6)];
    else                              sel = '0;
    xe = PROD_W'(x);
    p  = '0;
    for (int k = 0; k < K; k++) begin
      if (!sel[k].nz)       part[k] = '0;
      else if (sel[k].neg)  part[k] = -(xe <<< sel[k].sh);
      else                  part[k] = xe <<< sel[k].sh;
      p = p + part[k];
    end
  end

endmodule
