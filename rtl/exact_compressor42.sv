// Exact 4:2 compressor built from two full adders.
//
// The first adder adds x1, x2, x3 into s and cout; the second adds s, x4 and
// cin into sum and carry.  Hence x1+x2+x3+x4+cin = sum + 2*(carry + cout),
// and cout does not depend on cin, so a row of these compressors has no
// ripple from cin to cout.  Purely combinational.  Used for the product
// columns the multiplier keeps exact.
module exact_compressor42 (
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

  full_adder u_fa1 (.a(x1), .b(x2), .c(x3),  .sum(s),   .carry(cout));
  full_adder u_fa2 (.a(s),  .b(x4), .c(cin), .sum(sum), .carry(carry));
endmodule
