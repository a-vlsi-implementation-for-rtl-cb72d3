// tb_full_adder: exhaustive self-check of the one-bit full adder: {cout, s}
// must equal the integer sum a + b + cin. Prints one TB_RESULT line.
`timescale 1ns/1ps
module tb_full_adder;
  logic a, b, cin, s, cout;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

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
      if (int'({cout, s}) != int'(a) + int'(b) + int'(cin)) begin
        failures++;
        $display("FAIL a=%b b=%b cin=%b -> cout=%b s=%b", a, b, cin, cout, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
