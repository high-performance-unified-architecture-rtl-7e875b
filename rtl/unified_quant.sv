// unified_quant: unified forward / inverse H.264/AVC quantizer.
//
// One datapath computes both O = (S * sigma + phi) >> eps (forward
// quantization, sigma = MF) and O = (S * sigma + phi) <</>> eps (inverse
// quantization, sigma = V), selected per coefficient by in_op. It has four
// phases:
//   A  fetch QP/6, QP%6, MF or V and the dead zone f from ROMs; compute the
//      rounding value phi and the shift amount and direction (block eta and
//      a small adder);
//   B  multiply S by sigma (generic 16x15 signed multiplier, or the mux-MCM
//      when USE_MUX_MCM = 1) and select the data for the rounding adder: the
//      magnitude of the product for forward quantization, the signed product
//      for inverse;
//   C  add phi (31-bit adder);
//   D  shift with the 32-bit barrel shifter, give forward results back their
//      sign, and clip to a signed 16-bit output.
// N_STAGES picks one of the four configurations: 1 = non-pipelined (purely
// combinational), 2 = register between B and C, 3 = registers A/B and B/C,
// 4 = registers A/B, B/C and C/D. Throughput is always one coefficient per
// clock; a coefficient presented in cycle t appears on out_coef in cycle
// t + N_STAGES - 1, with out_valid, so the latency is N_STAGES cycles counting
// the cycle it enters. There is no stall.
//
// The phases, the shared operators, the eta table, the MF/V/f tables and the
// four configurations follow the document. This design's own choices: the
// valid bit, the reset, the sign-magnitude handling of forward quantization
// (which matches the H.264 reference encoder), n = 0 for DC coefficients,
// zero inverse rounding outside the 4x4 luma DC, left shift by QP/6 - tau for
// the DC rescaling, forming phi completely in phase A (the document settles
// it in phase B), and the output clipping.
module unified_quant
  import quant_pkg::*;
#(
  parameter int unsigned N_STAGES    = 4,
  parameter bit          USE_MUX_MCM = 1'b0
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic                     in_op,     // 0 forward, 1 inverse
  input  logic [1:0]               in_ttype,  // 00 H2x2 DC, 01 H4x4 DC, 1x core
  input  logic                     in_intra,
  input  logic [5:0]               in_qp,
  input  logic [1:0]               in_row,
  input  logic [1:0]               in_col,
  input  logic signed [COEF_W-1:0] in_coef,
  output logic                     out_valid,
  output logic signed [COEF_W-1:0] out_coef
);

  if (N_STAGES < 1 || N_STAGES > 4) begin : g_bad_cfg
    $error("unified_quant: N_STAGES must be 1..4");
  end

  localparam bit REG_AB = (N_STAGES >= 3);
  localparam bit REG_BC = (N_STAGES >= 2);
  localparam bit REG_CD = (N_STAGES == 4);

  // ---------------------------------------------------------------- phase A
  typedef struct packed {
    logic                      valid;
    op_e                       op;
    logic signed [COEF_W-1:0]  coef;
    logic [SIGMA_W-1:0]        sigma;
    logic [2:0]                qp_mod6;   // constant select for the mux-MCM
    logic [1:0]                n;
    logic [PHI_W-1:0]          phi;
    logic [4:0]                shamt;
    logic                      shr;
  } ab_t;

  op_e            a_op;
  ttype_e         a_tt;
  logic [3:0]     a_div6;
  logic [2:0]     a_mod6;
  logic           a_lt12, a_lt6;
  logic [1:0]     a_n;
  logic [MF_W-1:0] a_mf;
  logic [V_W-1:0] a_v;
  logic [F_W-1:0] a_f;
  ab_t            a_out, b_in;

  assign a_op = op_e'(in_op);
  assign a_tt = ttype_e'(in_ttype);

  qp_rom u_qp_rom (.qp(in_qp), .qp_div6(a_div6), .qp_mod6(a_mod6));

  always_comb begin
    a_lt6  = (a_div6 == 4'd0);
    a_lt12 = (a_div6 <= 4'd1);
    // position class of Equation 3; DC coefficients use the (0,0) entry
    if (is_dc(a_tt))                 a_n = 2'd0;
    else if (!in_row[0] && !in_col[0]) a_n = 2'd0;
    else if (in_row[0] && in_col[0])   a_n = 2'd1;
    else                               a_n = 2'd2;
  end

  mf_rom u_mf_rom (.qp_mod6(a_mod6), .n(a_n), .mf(a_mf));
  v_rom  u_v_rom  (.qp_mod6(a_mod6), .n(a_n), .v(a_v));
  f_rom  u_f_rom  (.qp_div6(a_div6), .f(a_f));

  deadzone_gen u_deadzone (
    .op(a_op), .ttype(a_tt), .intra(in_intra),
    .qp_lt12(a_lt12), .qp_lt6(a_lt6), .f(a_f), .phi(a_out.phi)
  );

  shift_calc u_shift (
    .op(a_op), .ttype(a_tt), .qp_div6(a_div6),
    .qp_lt12(a_lt12), .qp_lt6(a_lt6), .shamt(a_out.shamt), .shr(a_out.shr)
  );

  always_comb begin
    a_out.valid   = in_valid;
    a_out.op      = a_op;
    a_out.coef    = in_coef;
    a_out.sigma   = (a_op == OP_FQ) ? SIGMA_W'(a_mf) : SIGMA_W'(a_v);
    a_out.qp_mod6 = a_mod6;
    a_out.n       = a_n;
  end

  pipe_reg #(.T(ab_t), .EN(REG_AB)) u_reg_ab (.clk, .rst_n, .d(a_out), .q(b_in));

  // ---------------------------------------------------------------- phase B
  typedef struct packed {
    logic                     valid;
    logic                     neg;     // sign of the forward-quantized result
    logic signed [PROD_W-1:0] data;
    logic [PHI_W-1:0]         phi;
    logic [4:0]               shamt;
    logic                     shr;
  } bc_t;

  logic signed [PROD_W-1:0] b_prod;
  bc_t                      b_out, c_in;

  if (USE_MUX_MCM) begin : g_mcm
    mux_mcm u_mult (
      .x(b_in.coef), .op(b_in.op), .qp_mod6(b_in.qp_mod6), .n(b_in.n), .p(b_prod)
    );
  end else begin : g_mult
    signed_mult u_mult (.a(b_in.coef), .b(b_in.sigma), .p(b_prod));
  end

  always_comb begin
    b_out.valid = b_in.valid;
    b_out.neg   = (b_in.op == OP_FQ) && b_in.coef[COEF_W-1];
    b_out.data  = b_out.neg ? -b_prod : b_prod;
    b_out.phi   = b_in.phi;
    b_out.shamt = b_in.shamt;
    b_out.shr   = b_in.shr;
  end

  pipe_reg #(.T(bc_t), .EN(REG_BC)) u_reg_bc (.clk, .rst_n, .d(b_out), .q(c_in));

  // ---------------------------------------------------------------- phase C
  typedef struct packed {
    logic                     valid;
    logic                     neg;
    logic signed [PROD_W-1:0] sum;
    logic [4:0]               shamt;
    logic                     shr;
  } cd_t;

  cd_t c_out, d_in;

  always_comb begin
    c_out.valid = c_in.valid;
    c_out.neg   = c_in.neg;
    c_out.sum   = c_in.data + PROD_W'(c_in.phi);   // the 31-bit rounding adder
    c_out.shamt = c_in.shamt;
    c_out.shr   = c_in.shr;
  end

  pipe_reg #(.T(cd_t), .EN(REG_CD)) u_reg_cd (.clk, .rst_n, .d(c_out), .q(d_in));

  // ---------------------------------------------------------------- phase D
  logic signed [SHIFT_W-1:0] d_shifted, d_res;

  barrel_shifter u_shifter (
    .din(SHIFT_W'(d_in.sum)), .shamt(d_in.shamt), .shr(d_in.shr), .dout(d_shifted)
  );

  localparam logic signed [SHIFT_W-1:0] OUT_MAX = SHIFT_W'((1 << (COEF_W - 1)) - 1);
  localparam logic signed [SHIFT_W-1:0] OUT_MIN = -SHIFT_W'(1 << (COEF_W - 1));

  always_comb begin
    d_res = d_in.neg ? -d_shifted : d_shifted;
    if (d_res > OUT_MAX)      out_coef = OUT_MAX[COEF_W-1:0];
    else if (d_res < OUT_MIN) out_coef = OUT_MIN[COEF_W-1:0];
    else                      out_coef = d_res[COEF_W-1:0];
    out_valid = d_in.valid;
  end

  // QP is defined for 0..51 only
  a_qp_range: assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> in_qp <= 6'd51)
    else $error("unified_quant: QP %0d out of range", in_qp);

endmodule
