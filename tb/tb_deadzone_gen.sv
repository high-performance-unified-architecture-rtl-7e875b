// tb_deadzone_gen: for every opcode, transform type, block type and QP
// compares phi with the H.264 rounding terms: forward 2^qbits/3 (INTRA) or
// 2^qbits/6 (INTER), doubled for DC; inverse 2^(1-QP/6) for the 4x4 luma DC
// with QP < 12, else 0. f is supplied as floor(2^(15+QP/6)/3).
module tb_deadzone_gen;
  import quant_pkg::*;
  op_e         op;
  ttype_e      ttype;
  logic        intra, qp_lt12, qp_lt6;
  logic [21:0] f;
  logic [22:0] phi;
  int checks = 0, failures = 0;

  deadzone_gen dut (.op, .ttype, .intra, .qp_lt12, .qp_lt6, .f, .phi);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e, q2;
    for (int o = 0; o < 2; o++)
      for (int t = 0; t < 4; t++)
        for (int in = 0; in < 2; in++)
          for (int qp = 0; qp < 52; qp++) begin
            op      = op_e'(o);
            ttype   = ttype_e'(t);
            intra   = in[0];
            qp_lt12 = qp < 12;
            qp_lt6  = qp < 6;
            q2      = longint'(1) << (15 + qp / 6);
            f       = 22'(q2 / 3);
            #1;
            if (o == 0) e = (q2 / (in != 0 ? 3 : 6)) * ((t < 2) ? 2 : 1);
            else if (t == 1 && qp < 12) e = longint'(1) << (1 - qp / 6);
            else e = 0;
            checks++;
            if (longint'(phi) != e) begin
              failures++;
              $display("FAIL op=%0d t=%0d intra=%0d qp=%0d got %0d exp %0d", o, t, in, qp, phi, e);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
