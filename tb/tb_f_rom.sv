// tb_f_rom: checks the INTRA dead-zone offset floor(2^(15+k)/3) for every
// index k, and 0 above k = 8.
module tb_f_rom;
  logic [3:0]  qp_div6;
  logic [21:0] f;
  int checks = 0, failures = 0;

  f_rom dut (.qp_div6, .f);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e;
    for (int k = 0; k < 16; k++) begin
      qp_div6 = 4'(k);
      #1;
      e = (k <= 8) ? (longint'(1) << (15 + k)) / 3 : 0;
      checks++;
      if (longint'(f) != e) begin
        failures++;
        $display("FAIL k=%0d got %0d exp %0d", k, f, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
