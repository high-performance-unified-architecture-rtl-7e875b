// tb_signed_mult: corner and random operands of the 16 x 15-bit signed
// multiplier compared with 64-bit integer products.
module tb_signed_mult;
  logic signed [15:0] a;
  logic signed [14:0] b;
  logic signed [30:0] p;
  int checks = 0, failures = 0;

  signed_mult dut (.a, .b, .p);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(longint x, longint y);
    a = 16'(x);
    b = 15'(y);
    #1;
    checks++;
    if (longint'(p) != x * y) begin
      failures++;
      $display("FAIL %0d * %0d got %0d", x, y, p);
    end
  endtask

  initial begin
    longint ca [6] = '{0, 1, -1, 32767, -32768, 12345};
    longint cb [5] = '{0, 1, 13107, 16383, 29};
    foreach (ca[i]) foreach (cb[j]) check(ca[i], cb[j]);
    for (int i = 0; i < 2000; i++)
      check(longint'($signed(16'($urandom))), longint'($urandom_range(0, 16383)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
