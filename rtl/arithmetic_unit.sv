// arithmetic_unit: the "ARITHMETIC" block. Turns the 27-bit XOR result into an
// 8-bit approximation of the absolute difference of the two pixels.
//
// Only two-bit disagreements count. Each of the six four-bit levels k = 6..1
// has two AND gates: one over its two auxiliary XOR bits and one over its
// a/g XOR bits. Each AND that fires adds 2^(k-1), so a level whose four bits
// all differ adds 2^k. The top level adds 128 when two or all three of its bits
// differ: exactly two is found by the three_bit_process, all three by a
// three-input AND. The fourteen results form two 8-bit operands, which one
// 8-bit ripple-carry adder sums:
//
//   operand A = { two_differ, 0, aux_hit[5:0] }
//   operand B = { all_differ, 0, ag_hit[5:0]  }
//
// The gate count (one three-input gate, one three-bit process, twelve
// two-input gates, an 8-bit adder with two operand bits and the carry-in
// held constant) is the published schematic's; the pairing of XOR bits into
// the ANDs and the bit each result drives are this design's reading, chosen
// to reproduce the published sample results. With codes from pcipm_encoder
// the sum never exceeds 233, so `carry` stays 0; it is brought out so that no
// adder output is left dangling. Purely combinational.
module arithmetic_unit
  import pcipm_pkg::*;
(
  input  pcipm_code_t      d,       // XOR of two PCIPM codes
  output logic [PIX_W-1:0] diff,    // o7..o0
  output logic             carry    // adder carry out
);

  logic              two_differ;

  // The code layout in the package must add up to the 27-bit code width.
  if ($bits(pcipm_code_t) != CODE_W) begin : g_width_check
    $error("pcipm_code_t is %0d bits, expected %0d", $bits(pcipm_code_t), CODE_W);
  end
  logic              all_differ;
  logic [LEVELS-1:0] aux_hit;
  logic [LEVELS-1:0] ag_hit;
  logic [PIX_W-1:0]  op_a;
  logic [PIX_W-1:0]  op_b;

  three_bit_process u_top (
    .d          (d.top),
    .two_differ (two_differ)
  );

  assign all_differ = &d.top;

  always_comb begin
    for (int k = 0; k < int'(LEVELS); k++) begin
      aux_hit[k] = d.lvl[k].aux_hi & d.lvl[k].aux_lo;
      ag_hit[k]  = d.lvl[k].a & d.lvl[k].g;
    end
  end

  assign op_a = {two_differ, 1'b0, aux_hit};
  assign op_b = {all_differ, 1'b0, ag_hit};

  ripple_carry_adder #(.W(PIX_W)) u_adder (
    .a    (op_a),
    .b    (op_b),
    .cin  (1'b0),
    .s    (diff),
    .cout (carry)
  );

endmodule
