// tb_pcipm_encoder: exhaustive self-check of the 27-bit pixel pre-coder.
// The expected code is rebuilt from the value as an integer: the top level as
// the comparisons v >= 128, v >= 64 and v >= 192, and each level k from the
// shifted bits of v and of v XOR (v >> 1). Three codes worked out by hand
// (0, 204 and 255, the published sample pixels) are also checked as
// constants. Prints one TB_RESULT line.
`timescale 1ns/1ps
module tb_pcipm_encoder;
  import pcipm_pkg::*;
  logic [7:0]  pix;
  pcipm_code_t code;
  int checks = 0, failures = 0;

  pcipm_encoder dut (.pix(pix), .code(code));

  function automatic logic [26:0] expected(input int v);
    logic [26:0] c;
    int gv;
    int gk, gk1, gkm1;
    c = '0;
    gv = v ^ (v >> 1);
    c[26] = (v >= 128);
    c[25] = (v >= 64);
    c[24] = (v >= 192);
    for (int k = 1; k <= 6; k++) begin
      gkm1 = (gv >> (k - 1)) & 1;
      gk   = (gv >> k) & 1;
      gk1  = (gv >> (k + 1)) & 1;
      c[4*k-1] = 1'((gkm1 != 0) && (gk != 0 || gk1 != 0));
      c[4*k-2] = c[4*k-1];
      c[4*k-3] = 1'((v >> k) & 1);
      c[4*k-4] = 1'(gkm1);
    end
    return c;
  endfunction

  task automatic check_const(input logic [7:0] v, input logic [26:0] exp_code);
    pix = v;
    #1;
    checks++;
    if (code !== exp_code) begin
      failures++;
      $display("FAIL code(%0d)=%h expected %h", v, code, exp_code);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      pix = 8'(v);
      #1;
      checks++;
      if (code !== expected(v)) begin
        failures++;
        $display("FAIL code(%0d)=%h expected %h", v, code, expected(v));
      end
    end
    check_const(8'd0,   27'h0000000);
    check_const(8'd204, 27'h7F0D2F0);
    check_const(8'd255, 27'h7222222);
    check_const(8'd128, 27'h6000000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
