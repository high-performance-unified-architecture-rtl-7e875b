// tb_barrel_shifter: every shift amount in both directions on corner and
// random values, against the built-in shift operators of 64-bit integers.
module tb_barrel_shifter;
  logic signed [31:0] din, dout;
  logic [4:0]         shamt;
  logic               shr;
  int checks = 0, failures = 0;

  barrel_shifter dut (.din, .shamt, .shr, .dout);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint v, e;
    for (int r = 0; r < 60; r++) begin
      case (r)
        0: v = -1;
        1: v = 32'h7fffffff;
        2: v = -64'sd2147483648;
        3: v = 1;
        default: v = longint'($signed($urandom));
      endcase
      for (int s = 0; s < 32; s++)
        for (int d = 0; d < 2; d++) begin
          din = 32'(v); shamt = 5'(s); shr = d[0];
          #1;
          e = d ? (v >>> s) : longint'($signed(32'(v << s)));
          checks++;
          if (longint'(dout) != e) begin
            failures++;
            $display("FAIL v=%0d s=%0d shr=%0d got %0d exp %0d", v, s, d, dout, e);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
