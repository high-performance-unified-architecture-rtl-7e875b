// uq_stim_check: stimulus generator and scoreboard for unified_quant.
//
// Sweeps every QP 0..51, all four transform types, INTRA and INTER blocks,
// all 16 coefficient positions and NCOEF coefficient values per point, with
// the opcode alternating between forward and inverse on consecutive cycles,
// and an idle (in_valid = 0) cycle inserted at random about one cycle in
// sixteen. Every issued coefficient's expected result is computed here from
// the H.264 reference formulas (forward: sign(W)*((|W|*MF + f) >> qbits) with
// the DC variant; inverse: the standard's LevelScale = 16*v form with its own
// shifts and rounding) and queued with its issue cycle. Results are checked
// in order when out_valid is seen, including the distance in cycles, which
// must be LAT = N_STAGES - 1. Inputs change just after the rising edge and
// outputs are sampled on the falling edge, so a combinational DUT (LAT = 0)
// is checked in the same cycle. Mechanism counters (cov) record how often
// each case of the datapath was exercised.
module uq_stim_check #(
  parameter int NCOEF = 2,     // coefficient values per (op, type, QP, position, intra)
  parameter int LAT   = 3      // clock cycles from input to output
) (
  input  logic               clk,
  input  logic               rst_n,
  output logic               in_valid,
  output logic               in_op,
  output logic [1:0]         in_ttype,
  output logic               in_intra,
  output logic [5:0]         in_qp,
  output logic [1:0]         in_row,
  output logic [1:0]         in_col,
  output logic signed [15:0] in_coef,
  input  logic               out_valid,
  input  logic signed [15:0] out_coef,
  output logic               done,
  output int                 checks,
  output int                 failures,
  output int                 cov [14]
);

  localparam int MF [3][6] = '{'{13107, 11916, 10082, 9362, 8192, 7282},
                               '{5243, 4660, 4194, 3647, 3355, 2893},
                               '{8066, 7490, 6554, 5825, 5243, 4559}};
  localparam int V  [3][6] = '{'{10, 11, 13, 14, 16, 18},
                               '{16, 18, 20, 23, 25, 29},
                               '{13, 14, 16, 18, 20, 23}};

  // mechanism counters
  localparam int C_FQ_INTRA = 0, C_FQ_INTER = 1, C_FQ_DC = 2, C_FQ_NEG = 3,
                 C_IQ_AC_LEFT = 4, C_IQ_L_RND2 = 5, C_IQ_L_RND1 = 6,
                 C_IQ_L_LEFT = 7, C_IQ_C_RIGHT = 8, C_IQ_C_LEFT = 9,
                 C_SAT = 10, C_OP_SWITCH = 11, C_BUBBLE = 12, C_BACK2BACK = 13;

  typedef struct {
    int     value;
    longint cycle = 0;
  } exp_t;

  exp_t   q[$];
  longint cycle = 0;
  logic   last_valid, last_op;

  function automatic int sat16(longint v);
    if (v > 32767)  return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  // position class of the 4x4 scaling matrices
  function automatic int pos_class(int r, int c);
    if ((r % 2) == 0 && (c % 2) == 0) return 0;
    if ((r % 2) == 1 && (c % 2) == 1) return 1;
    return 2;
  endfunction

  function automatic int reference(int op, int tt, int intra, int qp, int r, int c, int w);
    int     k, m, n;
    longint qbits, f, mag, res, ls;
    bit     dc;
    k  = qp / 6;
    m  = qp % 6;
    dc = (tt < 2);
    n  = dc ? 0 : pos_class(r, c);
    if (op == 0) begin
      qbits = 15 + longint'(k);
      f     = (longint'(1) << qbits) / (intra != 0 ? 3 : 6);
      mag   = (w < 0) ? -longint'(w) : longint'(w);
      if (dc) mag = (mag * MF[0][m] + 2 * f) >> (qbits + 1);
      else    mag = (mag * MF[n][m] + f) >> qbits;
      res = (w < 0) ? -mag : mag;
    end else begin
      ls = 16 * V[n][m];
      if (tt >= 2) begin                      // AC
        if (qp >= 24) res = (longint'(w) * ls) <<< (k - 4);
        else          res = (longint'(w) * ls + (longint'(1) << (3 - k))) >>> (4 - k);
      end else if (tt == 1) begin             // luma DC
        if (qp >= 36) res = (longint'(w) * ls) <<< (k - 6);
        else          res = (longint'(w) * ls + (longint'(1) << (5 - k))) >>> (6 - k);
      end else begin                          // chroma DC
        res = ((longint'(w) * ls) <<< k) >>> 5;
      end
    end
    return sat16(res);
  endfunction

  task automatic note_coverage(int op, int tt, int intra, int qp, int w, int e);
    if (op == 0) begin
      if (tt >= 2 && intra != 0) cov[C_FQ_INTRA]++;
      if (tt >= 2 && intra == 0) cov[C_FQ_INTER]++;
      if (tt < 2)                cov[C_FQ_DC]++;
      if (w < 0 && e != 0)       cov[C_FQ_NEG]++;
    end else begin
      if (tt >= 2)               cov[C_IQ_AC_LEFT]++;
      if (tt == 1 && qp < 6)     cov[C_IQ_L_RND2]++;
      if (tt == 1 && qp >= 6 && qp < 12) cov[C_IQ_L_RND1]++;
      if (tt == 1 && qp >= 12)   cov[C_IQ_L_LEFT]++;
      if (tt == 0 && qp < 6)     cov[C_IQ_C_RIGHT]++;
      if (tt == 0 && qp >= 6)    cov[C_IQ_C_LEFT]++;
      if (e == 32767 || e == -32768) cov[C_SAT]++;
    end
  endtask

  function automatic int pick_coef(int op, int s);
    // forward: full 16-bit range with its corners; inverse: mostly levels
    // that fit a 16-bit result, sometimes large ones that must clip
    case (s)
      0: return (op == 0) ? -32768 : 2047;
      1: return (op == 0) ? 32767 : -2048;
      2: return -1;
      3: return 1;
      default: begin
        if (op == 0) return int'($signed(16'($urandom)));
        if ($urandom_range(0, 31) == 0) return int'($signed(16'($urandom)));
        return int'($urandom_range(0, 400)) - 200;
      end
    endcase
  endfunction

  always @(posedge clk) cycle <= cycle + 1;

  // scoreboard
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output %0d", out_coef);
      end else begin
        exp_t e;
        e = q.pop_front();
        if (int'(out_coef) != e.value || cycle - e.cycle != longint'(LAT)) begin
          failures++;
          if (failures < 20)
            $display("FAIL got %0d exp %0d latency %0d exp %0d",
                     out_coef, e.value, cycle - e.cycle, LAT);
        end
      end
    end
  end

  task automatic issue(int op, int tt, int intra, int qp, int r, int c, int w);
    int e;
    @(posedge clk);
    while ($urandom_range(0, 15) == 0) begin
      in_valid <= 1'b0;
      cov[C_BUBBLE]++;
      last_valid = 1'b0;
      @(posedge clk);
    end
    e = reference(op, tt, intra, qp, r, c, w);
    in_valid <= 1'b1;
    in_op    <= op[0];
    in_ttype <= 2'(tt);
    in_intra <= intra[0];
    in_qp    <= 6'(qp);
    in_row   <= 2'(r);
    in_col   <= 2'(c);
    in_coef  <= 16'(w);
    q.push_back('{value: e, cycle: cycle + 1});   // counter advances at this edge
    note_coverage(op, tt, intra, qp, w, e);
    if (last_valid) cov[C_BACK2BACK]++;
    if (last_valid && last_op != op[0]) cov[C_OP_SWITCH]++;
    last_valid = 1'b1;
    last_op    = op[0];
  endtask

  initial begin
    checks = 0;
    failures = 0;
    done = 1'b0;
    foreach (cov[i]) cov[i] = 0;
    last_valid = 1'b0;
    last_op = 1'b0;
    in_valid = 1'b0; in_op = 1'b0; in_ttype = '0; in_intra = 1'b0;
    in_qp = '0; in_row = '0; in_col = '0; in_coef = '0;
    wait (rst_n);
    for (int qp = 0; qp < 52; qp++)
      for (int tt = 0; tt < 4; tt++)
        for (int intra = 0; intra < 2; intra++)
          for (int p = 0; p < 16; p++)
            for (int s = 0; s < NCOEF; s++)
              for (int op = 0; op < 2; op++)
                issue(op, tt, intra, qp, p / 4, p % 4, pick_coef(op, (p * NCOEF + s) % 24));
    @(posedge clk);
    in_valid <= 1'b0;
    repeat (LAT + 3) @(posedge clk);
    if (q.size() != 0) begin
      failures++;
      $display("FAIL %0d results never came out", q.size());
    end
    done = 1'b1;
  end

endmodule
