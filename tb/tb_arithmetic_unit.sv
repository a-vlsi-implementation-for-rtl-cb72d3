// tb_arithmetic_unit: self-check of the arithmetic block with every single
// code bit, every top-level pattern and random 27-bit XOR results. The
// expected difference is summed directly: 128 if two or three of the top
// three bits are set, and for each level k = 6..1, 2^(k-1) when both of its
// auxiliary bits are set plus 2^(k-1) when both its a and g bits are set.
// Prints one TB_RESULT line.
`timescale 1ns/1ps
module tb_arithmetic_unit;
  import pcipm_pkg::*;
  pcipm_code_t d;
  logic [7:0] diff;
  logic carry;
  int checks = 0, failures = 0;

  arithmetic_unit dut (.d(d), .diff(diff), .carry(carry));

  function automatic int expected(input logic [26:0] x);
    int sum, top;
    top = int'(x[26]) + int'(x[25]) + int'(x[24]);
    sum = (top >= 2) ? 128 : 0;
    for (int k = 1; k <= 6; k++) begin
      if (x[4*k-1] && x[4*k-2]) sum += 1 << (k - 1);
      if (x[4*k-3] && x[4*k-4]) sum += 1 << (k - 1);
    end
    return sum;
  endfunction

  task automatic apply(input logic [26:0] x);
    d = x;
    #1;
    checks++;
    if (int'({carry, diff}) != expected(x)) begin
      failures++;
      $display("FAIL d=%h -> carry=%b diff=%0d expected %0d", x, carry, diff, expected(x));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply('0);
    apply('1);
    for (int i = 0; i < 27; i++) apply(27'(1) << i);
    for (int t = 0; t < 8; t++) apply({3'(t), 24'hFFFFFF});
    for (int k = 0; k < 6; k++) begin
      apply(27'(4'b1100) << (4 * k));
      apply(27'(4'b0011) << (4 * k));
      apply(27'(4'b1010) << (4 * k));
      apply(27'(4'b0101) << (4 * k));
    end
    for (int n = 0; n < 5000; n++) apply(27'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
