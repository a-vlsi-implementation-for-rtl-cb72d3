// carry_gen: the carry block of a full adder.
//
// Produces the carry out of one adder bit: it is 1 when at least two of a, b
// and cin are 1. The original block is a transistor-level CMOS gate; here it
// is written as its Boolean function, a AND b OR cin AND (a OR b).
// Purely combinational.
module carry_gen (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic carry
);

  assign carry = (a & b) | (cin & (a | b));

endmodule
