// tb_code_xor: self-check of the 27-bit exclusive-OR stage with random and
// corner-case code pairs; each output bit is compared with a per-bit
// inequality test of the inputs. Prints one TB_RESULT line.
`timescale 1ns/1ps
module tb_code_xor;
  logic [26:0] a, b, d;
  int checks = 0, failures = 0;

  code_xor dut (.code_a(a), .code_b(b), .diff_bits(d));

  task automatic apply(input logic [26:0] x, input logic [26:0] y);
    a = x;
    b = y;
    #1;
    for (int i = 0; i < 27; i++) begin
      checks++;
      if (d[i] !== (a[i] != b[i])) begin
        failures++;
        $display("FAIL bit %0d: a=%h b=%h d=%h", i, a, b, d);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply('0, '0);
    apply('1, '0);
    apply('0, '1);
    apply('1, '1);
    for (int i = 0; i < 27; i++) apply(27'(1) << i, '0);
    for (int n = 0; n < 2000; n++) apply(27'($urandom), 27'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
