// Majority-logic approximate 4:2 compressor.
//
// Two three-input majority gates and an inverter replace the two full adders:
//   carry = x4, cout = x3                  (plain wires)
//   s     = NOT maj(x3, x4, NOT cin)        (first gate, inverted output)
//   sum   = maj(x1, s, x2)                  (second gate)
// It is exact on many input patterns, e.g. all zeros, and trades accuracy
// for a very short path; the multiplier uses it in its second reduction
// level.  Purely combinational; cout does not depend on cin.  The gate
// arrangement follows the reference schematic.
module majority_compressor42 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  import approx_mult_pkg::maj3;

  logic s;

  always_comb begin
    s     = ~maj3(x3, x4, ~cin);
    sum   = maj3(x1, s, x2);
    carry = x4;
    cout  = x3;
  end
endmodule
