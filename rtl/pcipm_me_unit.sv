// pcipm_me_unit: Boolean-only pixel matching unit for block motion
// estimation by pre-coded image-plane matching (PCIPM).
//
// Two 27-bit generators pre-code a pixel of the current frame and a pixel of
// the candidate position; the 27-bit process XORs the two codes; the
// arithmetic block counts two-bit disagreements per level, weights them by
// level and adds them into `diff`, an approximation of |pix_a - pix_b| that a
// motion search accumulates over a block in place of the absolute difference.
// The structure (two generators, one XOR stage, one arithmetic block) is the
// published top-level diagram. The unit is purely combinational, with no
// clock or reset: an output is valid one propagation delay after the inputs
// settle (the original full-custom circuit was sized for a 6 ns cycle).
module pcipm_me_unit
  import pcipm_pkg::*;
(
  input  logic [PIX_W-1:0] pix_a,   // reference pixel
  input  logic [PIX_W-1:0] pix_b,   // candidate pixel
  output logic [PIX_W-1:0] diff,    // approximate absolute difference o7..o0
  output logic             carry    // adder carry out, 0 for all pixel pairs
);

  pcipm_code_t code_a;
  pcipm_code_t code_b;
  pcipm_code_t xor_bits;

  pcipm_encoder u_gen_a (
    .pix  (pix_a),
    .code (code_a)
  );

  pcipm_encoder u_gen_b (
    .pix  (pix_b),
    .code (code_b)
  );

  code_xor #(.W(CODE_W)) u_process (
    .code_a    (code_a),
    .code_b    (code_b),
    .diff_bits (xor_bits)
  );

  arithmetic_unit u_arith (
    .d     (xor_bits),
    .diff  (diff),
    .carry (carry)
  );

endmodule
