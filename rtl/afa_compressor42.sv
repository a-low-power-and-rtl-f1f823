// Approximate 4:2 compressor built from two almost full adders.
//
// Same structure as the exact compressor: the first almost full adder takes
// x1, x2, x3 (as a, b, cin) and gives s and cout; the second takes s, x4,
// cin and gives sum and carry.  The sum bit is always the exact parity of
// the five inputs; only the carries are approximate (cout = x2&x3,
// carry = x4&cin).  The multiplier uses it in its first reduction level.
// Purely combinational; cout does not depend on cin.  The mapping of the
// compressor inputs onto the adders' a/b/cin pins is this implementation's
// reading of the reference structure.
module afa_compressor42 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  logic s;

  almost_full_adder u_afa1 (.a(x1), .b(x2), .cin(x3),  .sum(s),   .carry(cout));
  almost_full_adder u_afa2 (.a(s),  .b(x4), .cin(cin), .sum(sum), .carry(carry));
endmodule
