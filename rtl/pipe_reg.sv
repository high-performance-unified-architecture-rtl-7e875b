// pipe_reg: optional pipeline register between two phases of the quantizer.
//
// With EN = 1 it is a register of type T loaded every clock (there is no
// stall in the quantizer) and cleared by the asynchronous active-low reset.
// With EN = 0 it is a plain wire, which is how the document turns the fully
// pipelined datapath into its shorter-pipeline and non-pipelined versions.
module pipe_reg #(
  parameter type T  = logic,
  parameter bit  EN = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  input  T     d,
  output T     q
);

  if (EN) begin : g_reg
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) q <= T'(0);
      else        q <= d;
    end
  end else begin : g_wire
    assign q = d;
  end

endmodule
