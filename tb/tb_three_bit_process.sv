// tb_three_bit_process: exhaustive self-check of the top-level evaluator:
// the output must be 1 exactly when two of the three inputs are 1.
// Prints one TB_RESULT line.
`timescale 1ns/1ps
module tb_three_bit_process;
  logic [2:0] d;
  logic two;
  int checks = 0, failures = 0;

  three_bit_process dut (.d(d), .two_differ(two));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int ones;
      d = 3'(v);
      #1;
      ones = (v & 1) + ((v >> 1) & 1) + ((v >> 2) & 1);
      checks++;
      if (two !== (ones == 2)) begin
        failures++;
        $display("FAIL d=%b two_differ=%b", d, two);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
