// Partial-product generator with run-time truncation.
//
// Row i of the N x N unsigned AND array is (a & {N{b[i]}}) << i, placed in a
// PW-bit row.  A mask then clears every partial-product bit whose product
// column is below trunc, so trunc = 0 gives the full array and larger values
// drop more low-order columns: fewer ones enter the reduction tree, which
// lowers switching activity at the cost of accuracy, chosen per operation.
// Purely combinational.  Run-time truncation of partial products follows the
// reference design; selecting it as a column count is this implementation's
// choice.
module pp_generator
  import approx_mult_pkg::*;
#(
  parameter int unsigned N  = approx_mult_pkg::MULT_N,
  parameter int unsigned PW = 2 * N,
  localparam int unsigned TW = $clog2(PW + 1)
) (
  input  logic [N-1:0]  a,
  input  logic [N-1:0]  b,
  input  logic [TW-1:0] trunc,
  output logic [PW-1:0] pp [N]
);
  logic [PW-1:0] keep;  // 1 in every product column that is kept

  always_comb begin
    for (int k = 0; k < PW; k++) keep[k] = (k >= int'(trunc));
    for (int i = 0; i < N; i++) begin
      pp[i] = ((PW'(a) & {PW{b[i]}}) << i) & keep;
    end
  end
endmodule
