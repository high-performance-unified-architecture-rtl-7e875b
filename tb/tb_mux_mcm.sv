// tb_mux_mcm: for each of the 36 MF and V constants, multiplies corner and
// random coefficients and compares with the integer product; unused selects
// must give 0.
module tb_mux_mcm;
  import quant_pkg::*;
  localparam int MF [3][6] = '{'{13107, 11916, 10082, 9362, 8192, 7282},
                               '{5243, 4660, 4194, 3647, 3355, 2893},
                               '{8066, 7490, 6554, 5825, 5243, 4559}};
  localparam int V  [3][6] = '{'{10, 11, 13, 14, 16, 18},
                               '{16, 18, 20, 23, 25, 29},
                               '{13, 14, 16, 18, 20, 23}};
  logic signed [15:0] x;
  op_e                op;
  logic [2:0]         qp_mod6;
  logic [1:0]         n;
  logic signed [30:0] p;
  int checks = 0, failures = 0;

  mux_mcm dut (.x, .op, .qp_mod6, .n, .p);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint c, e;
    int     xs;
    for (int o = 0; o < 2; o++)
      for (int j = 0; j < 4; j++)
        for (int q = 0; q < 8; q++) begin
          c = (j < 3 && q < 6) ? ((o == 0) ? MF[j][q] : V[j][q]) : 0;
          for (int r = 0; r < 40; r++) begin
            case (r)
              0: xs = 32767;
              1: xs = -32768;
              2: xs = -1;
              3: xs = 1;
              4: xs = 0;
              default: xs = int'($signed(16'($urandom)));
            endcase
            x = 16'(xs); op = op_e'(o); n = 2'(j); qp_mod6 = 3'(q);
            #1;
            e = longint'(xs) * c;
            checks++;
            if (longint'(p) != e) begin
              failures++;
              $display("FAIL op=%0d n=%0d q=%0d x=%0d got %0d exp %0d", o, j, q, xs, p, e);
            end
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
