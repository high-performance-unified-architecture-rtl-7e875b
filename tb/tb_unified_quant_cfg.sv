// tb_unified_quant_cfg: the four pipeline configurations (1 to 4 stages)
// each with the generic multiplier and with the mux-MCM, eight quantizers in
// all, run side by side through the same kind of sweep as tb_unified_quant.
// Each is checked against the H.264 reference formulas and for a latency of
// N_STAGES - 1 register delays at one coefficient per clock.
module tb_unified_quant_cfg;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic done [8];
  int   checks [8];
  int   failures [8];

  always #5 clk = ~clk;

  for (genvar g = 0; g < 8; g++) begin : g_cfg
    localparam int unsigned NS  = (g % 4) + 1;
    localparam bit          MCM = (g >= 4);
    logic               in_valid, in_op, in_intra;
    logic [1:0]         in_ttype, in_row, in_col;
    logic [5:0]         in_qp;
    logic signed [15:0] in_coef;
    logic               out_valid;
    logic signed [15:0] out_coef;
    int                 cov [14];

    unified_quant #(.N_STAGES(NS), .USE_MUX_MCM(MCM)) dut (
      .clk, .rst_n, .in_valid, .in_op, .in_ttype, .in_intra, .in_qp,
      .in_row, .in_col, .in_coef, .out_valid, .out_coef
    );

    uq_stim_check #(.NCOEF(1), .LAT(int'(NS) - 1)) u_chk (
      .clk, .rst_n, .in_valid, .in_op, .in_ttype, .in_intra, .in_qp,
      .in_row, .in_col, .in_coef, .out_valid, .out_coef,
      .done(done[g]), .checks(checks[g]), .failures(failures[g]), .cov
    );
  end

  function automatic int total(int a [8]);
    int s = 0;
    foreach (a[i]) s += a[i];
    return s;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", total(checks), total(failures) + 1);
    $finish;
  end

  initial begin
    bit all_done;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    do begin
      @(posedge clk);
      all_done = 1'b1;
      foreach (done[i]) all_done &= done[i];
    end while (!all_done);
    foreach (checks[i])
      $display("config %0d: stages=%0d mux_mcm=%0d checks=%0d failures=%0d",
               i, (i % 4) + 1, i >= 4, checks[i], failures[i]);
    $display("TB_RESULT checks=%0d failures=%0d", total(checks), total(failures));
    $finish;
  end
endmodule
