// tb_mf_rom: checks every address of mf_rom, including the unused ones
// that must read 0, against the H.264 table typed in here.
module tb_mf_rom;
  localparam int EXP [3][6] = '{'{13107, 11916, 10082, 9362, 8192, 7282}, '{5243, 4660, 4194, 3647, 3355, 2893}, '{8066, 7490, 6554, 5825, 5243, 4559}};
  logic [2:0]    qp_mod6;
  logic [1:0]    n;
  logic [13:0] mf;
  int checks = 0, failures = 0;

  mf_rom dut (.qp_mod6, .n, .mf);

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
        if (int'(mf) != e) begin
          failures++;
          $display("FAIL n=%0d q=%0d got %0d exp %0d", a, q, mf, e);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
