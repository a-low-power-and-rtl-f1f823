// Exact one-bit full adder.
//
// sum = a ^ b ^ c and carry = majority(a, b, c), so a + b + c = sum + 2*carry.
// This is the conventional adder the almost full adder is measured against;
// it builds the exact 4:2 compressor and the final carry-propagate adder.
// Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);
  import approx_mult_pkg::maj3;

  always_comb begin
    sum   = a ^ b ^ c;
    carry = maj3(a, b, c);
  end
endmodule
