// tb_v_rom: checks every address of v_rom, including the unused ones
// that must read 0, against the H.264 table typed in here.
module tb_v_rom;
  localparam int EXP [3][6] = '{'{10, 11, 13, 14, 16, 18}, '{16, 18, 20, 23, 25, 29}, '{13, 14, 16, 18, 20, 23}};
  logic [2:0]    qp_mod6;
  logic [1:0]    n;
  logic [4:0] v;
  int checks = 0, failures = 0;

  v_rom dut (.qp_mod6, .n, .v);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    for (int a = 0; a < 4; a++)
      for (int q = 0; q < 8; q++) begin
        n = 2'(a);
        qp_mod6 = 3'(q);
        #1;
        e = (a < 3 && q < 6) ? EXP[a][q] : 0;
        checks++;
        if (int'(v) != e) begin
          failures++;
          $display("FAIL n=%0d q=%0d got %0d exp %0d", a, q, v, e);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
