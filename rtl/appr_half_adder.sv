// Approximate half adder.
//
// The sum XOR of an exact half adder is replaced by an OR gate:
//   s = a | b,  c = a & b.
// The only wrong case is a = b = 1, which gives s = 1, c = 1 (value 3 instead
// of 2). The design uses this cell in the reduction tree and inside the
// modified 4-2 compressor. Purely combinational.
module appr_half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);

  assign s = a | b;
  assign c = a & b;

endmodule
