// three_bit_process: evaluates the three XOR bits of the top code level.
//
// The top level is a thermometer code of the pixel's quarter of the grey
// range. Neighbouring quarters differ in one bit, which must not count;
// quarters two apart differ in two bits and three apart in all three. This
// block raises `two_differ` when exactly two of the three bits differ; the
// all-three case is detected by a separate three-input AND in the arithmetic
// block, so the two outputs never rise together and each adds 128 through
// its own adder operand. The block's name and its three inputs are given by
// the published schematic; the exact-two function is this design's reading,
// chosen because it reproduces the published sample results (0 against 255
// gives 128, 0 against 204 gives 204) with no adder overflow.
// Purely combinational.
module three_bit_process (
  input  logic [2:0] d,            // XOR of c26, c25, c24
  output logic       two_differ    // exactly two of the three bits set
);

  assign two_differ = (d[2] & d[1] & ~d[0])
                    | (d[2] & ~d[1] & d[0])
                    | (~d[2] & d[1] & d[0]);

endmodule
