// Full adder in the two-XOR / one-multiplexer form.
//
// The sum is made by two cascaded XOR gates, s = (a ^ b) ^ cin. The carry
// comes from a 2:1 multiplexer selected by the first XOR: when a ^ b is 1 the
// carry is cin, otherwise it is a (then a == b, so a is the carry). This is
// the logic of the design's 8-transistor full adder and is exact. Purely
// combinational.
module fulladder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);

  logic axb;

  assign axb  = a ^ b;
  assign s    = axb ^ cin;
  assign cout = axb ? cin : a;

endmodule
