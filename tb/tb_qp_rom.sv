// tb_qp_rom: exhaustive check of qp_rom against integer division and modulo
// for all 64 QP codes.
module tb_qp_rom;
  logic [5:0] qp;
  logic [3:0] qp_div6;
  logic [2:0] qp_mod6;
  int checks = 0, failures = 0;

  qp_rom dut (.qp, .qp_div6, .qp_mod6);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int q = 0; q < 64; q++) begin
      qp = 6'(q);
      #1;
      checks++;
      if (qp_div6 != 4'(q / 6) || qp_mod6 != 3'(q % 6)) begin
        failures++;
        $display("FAIL qp=%0d div6=%0d mod6=%0d", q, qp_div6, qp_mod6);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
