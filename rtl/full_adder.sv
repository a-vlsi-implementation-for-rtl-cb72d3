// full_adder: one bit of the ripple-carry adder.
//
// As in the published schematic, the sum is formed by two cascaded
// exclusive-ORs (a XOR b, then XOR cin) and the carry by a separate carry
// block fed with a, b and cin. Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);

  logic ab;

  assign ab = a ^ b;
  assign s  = ab ^ cin;

  carry_gen u_carry (
    .a     (a),
    .b     (b),
    .cin   (cin),
    .carry (cout)
  );

endmodule
