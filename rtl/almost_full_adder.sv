// Almost full adder: a full adder with a simplified carry.
//
// The sum is exact, sum = a ^ b ^ cin, but the carry is only b & cin: it
// drops the a&b and a&cin carry terms, so the inputs (1,0,1) and (1,1,0)
// yield carry 0 instead of 1 and the result loses a weight of 2 in those two
// of the eight input cases.  One XOR3 and one AND2 replace the majority gate.
// Purely combinational.  The sum and carry equations follow the reference
// design.
module almost_full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic carry
);
  always_comb begin
    sum   = a ^ b ^ cin;
    carry = b & cin;
  end
endmodule
