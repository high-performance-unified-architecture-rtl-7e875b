// tb_shift_calc: for every opcode, transform type and QP 0..51 compares the
// shift amount and direction with the exponent of the H.264 formulas:
// forward -(15 + QP/6 + h); inverse QP/6 - tau.
module tb_shift_calc;
  import quant_pkg::*;
  op_e        op;
  ttype_e     ttype;
  logic [3:0] qp_div6;
  logic       qp_lt12, qp_lt6;
  logic [4:0] shamt;
  logic       shr;
  int checks = 0, failures = 0;

  shift_calc dut (.op, .ttype, .qp_div6, .qp_lt12, .qp_lt6, .shamt, .shr);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e, tau, h;
    for (int o = 0; o < 2; o++)
      for (int t = 0; t < 4; t++)
        for (int qp = 0; qp < 52; qp++) begin
          op      = op_e'(o);
          ttype   = ttype_e'(t);
          qp_div6 = 4'(qp / 6);
          qp_lt12 = qp < 12;
          qp_lt6  = qp < 6;
          #1;
          h   = (t < 2) ? 1 : 0;
          tau = (t == 1) ? 2 : (t == 0) ? 1 : 0;
          e   = (o == 0) ? -(15 + qp / 6 + h) : (qp / 6 - tau);   // exponent of 2
          checks++;
          if (shr != (e < 0) || int'(shamt) != (e < 0 ? -e : e)) begin
            failures++;
            $display("FAIL op=%0d t=%0d qp=%0d got shr=%b amt=%0d exp e=%0d", o, t, qp, shr, shamt, e);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
