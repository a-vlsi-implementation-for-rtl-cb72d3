// tb_ripple_carry_adder: exhaustive self-check of the 8-bit ripple-carry
// adder over all operand pairs and both carry-in values; {cout, s} must equal
// the integer sum. Prints one TB_RESULT line.
`timescale 1ns/1ps
module tb_ripple_carry_adder;
  logic [7:0] a, b, s;
  logic cin, cout;
  int checks = 0, failures = 0;

  ripple_carry_adder dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 2; c++)
      for (int x = 0; x < 256; x++)
        for (int y = 0; y < 256; y++) begin
          a = 8'(x);
          b = 8'(y);
          cin = 1'(c);
          #1;
          checks++;
          if (int'({cout, s}) != x + y + c) begin
            failures++;
            if (failures < 10)
              $display("FAIL %0d + %0d + %0d -> %0d", x, y, c, int'({cout, s}));
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
