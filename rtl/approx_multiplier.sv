// Approximate 8x8 unsigned multiplier with adjustable accuracy.
//
// P ~= A * B in three combinational steps:
//   1. pp_generator forms the eight partial-product rows and clears those
//      bits whose product column is below trunc (run-time truncation).
//   2. Two reduction levels of 4:2 compressors: rows 0-3 and rows 4-7 are
//      each compressed to two rows by almost-full-adder compressors, and the
//      resulting four rows to two by majority-logic compressors.  In both
//      levels only the APPROX_COLS lowest product columns are approximate;
//      the columns above use exact compressors.
//   3. final_adder adds the last two rows into the 16-bit product.
// Inputs A, B, trunc; output P.  No clock or reset: the whole path is
// combinational, so P follows the inputs after the logic delay.
// trunc = 0 with APPROX_COLS = 0 gives the exact product.  The two-level
// compressor tree with almost-full-adder compressors first and majority
// compressors after, the truncation feature, and the port names follow the
// reference design; the tree's row grouping and the default of eight
// approximate columns are this implementation's choices.
module approx_multiplier
  import approx_mult_pkg::*;
#(
  parameter int unsigned N           = approx_mult_pkg::MULT_N,
  parameter int unsigned APPROX_COLS = N,
  localparam int unsigned PW = 2 * N,
  localparam int unsigned TW = $clog2(PW + 1)
) (
  input  logic [N-1:0]  A,
  input  logic [N-1:0]  B,
  input  logic [TW-1:0] trunc,
  output logic [PW-1:0] P
);
  // The compressor tree below is wired for exactly eight partial-product rows.
  if (N != 8) begin : g_bad_width
    $error("approx_multiplier: the reduction tree is built for N = 8");
  end

  logic [PW-1:0] pp [N];
  logic [PW-1:0] s0, c0, s1, c1;  // level-1 outputs
  logic [PW-1:0] s2, c2;          // level-2 outputs

  pp_generator #(.N(N), .PW(PW)) u_pp (.a(A), .b(B), .trunc(trunc), .pp(pp));

  // Level 1: almost-full-adder compressors.
  compressor42_row #(.PW(PW), .KIND(CMP_AFA), .APPROX_COLS(APPROX_COLS)) u_l1_lo (
    .r0(pp[0]), .r1(pp[1]), .r2(pp[2]), .r3(pp[3]), .s(s0), .c(c0)
  );
  compressor42_row #(.PW(PW), .KIND(CMP_AFA), .APPROX_COLS(APPROX_COLS)) u_l1_hi (
    .r0(pp[4]), .r1(pp[5]), .r2(pp[6]), .r3(pp[7]), .s(s1), .c(c1)
  );

  // Level 2: majority-logic compressors.
  compressor42_row #(.PW(PW), .KIND(CMP_MAJ), .APPROX_COLS(APPROX_COLS)) u_l2 (
    .r0(s0), .r1(c0), .r2(s1), .r3(c1), .s(s2), .c(c2)
  );

  final_adder #(.PW(PW)) u_cpa (.x(s2), .y(c2), .p(P));
endmodule
