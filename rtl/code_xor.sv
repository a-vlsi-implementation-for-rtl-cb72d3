// code_xor: the "27bit_process". Bitwise exclusive-OR of two pre-coded
// pixels; a 1 marks a code bit in which the two pixels disagree.
//
// Purely combinational, one XOR per bit. The width defaults to the 27-bit
// PCIPM code.
module code_xor #(
  parameter int unsigned W = 27
) (
  input  logic [W-1:0] code_a,
  input  logic [W-1:0] code_b,
  output logic [W-1:0] diff_bits
);

  assign diff_bits = code_a ^ code_b;

endmodule
