// tb_gray_encoder: exhaustive self-check of the 8-bit binary to Gray
// converter. For every input it checks that decoding the output (running XOR
// from the top bit down) gives the input back, and that the codes of
// consecutive values differ in exactly one bit, including the wrap from 255
// to 0. Prints one TB_RESULT line.
`timescale 1ns/1ps
module tb_gray_encoder;
  logic [7:0] bin, gray, prev_gray, first_gray;
  int checks = 0, failures = 0;

  gray_encoder dut (.bin(bin), .gray(gray));

  function automatic logic [7:0] decode(input logic [7:0] g);
    logic [7:0] b;
    b[7] = g[7];
    for (int k = 6; k >= 0; k--) b[k] = b[k+1] ^ g[k];
    return b;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      bin = 8'(v);
      #1;
      checks++;
      if (decode(gray) !== bin) begin
        failures++;
        $display("FAIL gray(%0d)=%b does not decode back", v, gray);
      end
      if (v == 0) first_gray = gray;
      else begin
        checks++;
        if ($countones(gray ^ prev_gray) != 1) begin
          failures++;
          $display("FAIL gray(%0d) and gray(%0d) differ in %0d bits", v - 1, v,
                   $countones(gray ^ prev_gray));
        end
      end
      prev_gray = gray;
    end
    checks++;
    if ($countones(first_gray ^ prev_gray) != 1 || first_gray != 8'h00) begin
      failures++;
      $display("FAIL wrap-around from 255 to 0");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
