// tb_unified_quant: end-to-end test of unified_quant at its default
// parameters (4 pipeline stages, generic multiplier). A stream of forward and
// inverse quantizations over every QP, transform type, block type and
// coefficient position is pushed through back to back, each result checked
// against the H.264 reference formulas and for a latency of 4 cycles (3
// register delays). Each datapath mechanism must have been exercised at least
// once: INTRA/INTER and DC forward quantization, negative coefficients,
// inverse left shifts, the three luma-DC rounding cases, chroma-DC right and
// left shifts, output clipping, opcode switches between consecutive cycles,
// idle cycles and back-to-back issue.
module tb_unified_quant;
  logic               clk = 1'b0;
  logic               rst_n = 1'b0;
  logic               in_valid, in_op, in_intra;
  logic [1:0]         in_ttype, in_row, in_col;
  logic [5:0]         in_qp;
  logic signed [15:0] in_coef;
  logic               out_valid;
  logic signed [15:0] out_coef;
  logic               done;
  int                 checks, failures;
  int                 cov [14];

  always #5 clk = ~clk;

  unified_quant dut (
    .clk, .rst_n, .in_valid, .in_op, .in_ttype, .in_intra, .in_qp,
    .in_row, .in_col, .in_coef, .out_valid, .out_coef
  );

  uq_stim_check #(.NCOEF(4), .LAT(3)) u_chk (
    .clk, .rst_n, .in_valid, .in_op, .in_ttype, .in_intra, .in_qp,
    .in_row, .in_col, .in_coef, .out_valid, .out_coef,
    .done, .checks, .failures, .cov
  );

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int misses;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done);
    misses = 0;
    foreach (cov[i]) begin
      $display("mechanism %0d exercised %0d times", i, cov[i]);
      if (cov[i] == 0) misses++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + misses);
    $finish;
  end
endmodule
