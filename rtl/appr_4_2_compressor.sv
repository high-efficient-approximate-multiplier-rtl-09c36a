// Modified approximate 4-2 compressor.
//
// Four bits of the same weight are reduced to a sum s (same weight) and a
// carry c (double weight). Structure, as in the design:
//   full adder f1 : x1 + x2 (+ carry-in tied to 0)  -> sum s1, carry c1
//   full adder f2 : s1 + x3 + x4                     -> sum s,  carry c2
//   approximate half adder f3 : c1, c2               -> hs = c1 | c2, hc = c1 & c2
//   XOR gate f4 : c = hs ^ hc
// With the OR-sum half adder, c = c1 ^ c2. The sum is always exact; the result
// 2c + s is exact for every input except x1 = x2 = x3 = x4 = 1, which yields 0
// instead of 4 (1 wrong case in 16). There is no carry-in or carry-out to a
// neighbouring compressor. Purely combinational.
module appr_4_2_compressor (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  output logic s,
  output logic c
);

  logic s1, c1, c2, hs, hc;

  fulladder f1 (.a(x1), .b(x2), .cin(1'b0), .s(s1), .cout(c1));
  fulladder f2 (.a(s1), .b(x3), .cin(x4),   .s(s),  .cout(c2));
  appr_half_adder f3 (.a(c1), .b(c2), .s(hs), .c(hc));

  assign c = hs ^ hc;

endmodule
