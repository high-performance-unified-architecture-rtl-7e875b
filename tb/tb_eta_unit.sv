// tb_eta_unit: exhaustive check of the shift-direction table (forward always
// right; inverse right only for H2x2 with QP < 6 and H4x4 with QP < 12).
module tb_eta_unit;
  import quant_pkg::*;
  op_e    op;
  ttype_e ttype;
  logic   qp_lt12, qp_lt6, eta;
  int checks = 0, failures = 0;

  eta_unit dut (.op, .ttype, .qp_lt12, .qp_lt6, .eta);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic e;
    for (int i = 0; i < 32; i++) begin
      op      = op_e'(i[4]);
      ttype   = ttype_e'(i[3:2]);
      qp_lt12 = i[1];
      qp_lt6  = i[0];
      #1;
      if (i[4] == 1'b0)        e = 1'b1;
      else if (i[3:2] == 2'b00) e = i[0];
      else if (i[3:2] == 2'b01) e = i[1];
      else                      e = 1'b0;
      checks++;
      if (eta !== e) begin
        failures++;
        $display("FAIL in=%b got %b exp %b", i[4:0], eta, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
