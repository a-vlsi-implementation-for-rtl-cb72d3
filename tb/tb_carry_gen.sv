// tb_carry_gen: exhaustive self-check of the carry block against the
// arithmetic sum a + b + cin (carry is 1 when the sum is 2 or 3).
// Prints one TB_RESULT line.
`timescale 1ns/1ps
module tb_carry_gen;
  logic a, b, cin, carry;
  int checks = 0, failures = 0;

  carry_gen dut (.a(a), .b(b), .cin(cin), .carry(carry));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = 3'(v);
      #1;
      checks++;
      if (carry !== ((int'(a) + int'(b) + int'(cin)) >= 2)) begin
        failures++;
        $display("FAIL a=%b b=%b cin=%b carry=%b", a, b, cin, carry);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
