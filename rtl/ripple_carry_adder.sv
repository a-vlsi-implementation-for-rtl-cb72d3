// ripple_carry_adder: W-bit adder made of a chain of full adders.
//
// Bit i adds a[i], b[i] and the carry of bit i-1; bit 0 takes `cin` and the
// carry of the last bit leaves as `cout`. The 8-bit width and the ripple
// structure (S0..S7 out, carry passed from stage to stage) follow the
// published block diagram. Purely combinational; the carry ripples through
// all W stages, which is the longest path of the whole unit.
module ripple_carry_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  logic [W:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (
      .a    (a[i]),
      .b    (b[i]),
      .cin  (c[i]),
      .s    (s[i]),
      .cout (c[i+1])
    );
  end

  assign cout = c[W];

endmodule
