// Shared constants and types of the approximate 8x8 multiplier.
//
// MULT_N and MULT_PW are the operand and product widths of the unsigned multiplier
// (8-bit operands, 16-bit product, as in the reference design).  cmp_kind_t
// selects which 4:2 compressor a reduction row instantiates; this encoding is
// a choice of this implementation, not something the reference design fixes.
package approx_mult_pkg;

  localparam int unsigned MULT_N  = 8;           // operand width
  localparam int unsigned MULT_PW = 2 * MULT_N;  // product width

  // Kinds of 4:2 compressor used in a reduction row.
  typedef enum logic [1:0] {
    CMP_EXACT = 2'd0,  // two exact full adders
    CMP_AFA   = 2'd1,  // two almost full adders (first reduction level)
    CMP_MAJ   = 2'd2   // majority-logic compressor (second reduction level)
  } cmp_kind_t;

  // Majority of three bits.
  function automatic logic maj3(input logic a, input logic b, input logic c);
    return (a & b) | (a & c) | (b & c);
  endfunction

endpackage
