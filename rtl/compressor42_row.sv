// One reduction level: four PW-bit rows in, a sum row and a carry row out.
//
// One 4:2 compressor per product column k takes bit k of r0..r3 (as x1..x4)
// and the cout of column k-1 as its cin (0 for column 0).  Column k's sum
// goes to s[k] and its carry to c[k+1], so for exact compressors
//   r0 + r1 + r2 + r3 = s + c   (mod 2^PW).
// The cout and carry of the top column are dropped, as the product is only
// PW bits wide.  Columns below APPROX_COLS use the compressor selected by
// KIND; the columns at and above it use the exact compressor.  Because each
// compressor's cout is independent of its cin, the row has a constant depth.
// Purely combinational.  The per-column split into approximate and exact
// compressors is a choice of this implementation.
module compressor42_row
  import approx_mult_pkg::*;
#(
  parameter int unsigned PW          = approx_mult_pkg::MULT_PW,
  parameter cmp_kind_t   KIND        = CMP_AFA,
  parameter int unsigned APPROX_COLS = 8
) (
  input  logic [PW-1:0] r0,
  input  logic [PW-1:0] r1,
  input  logic [PW-1:0] r2,
  input  logic [PW-1:0] r3,
  output logic [PW-1:0] s,
  output logic [PW-1:0] c
);
  logic [PW:0] cy;     // cy[k] is the carry of column k-1 (weight k)
  logic [PW:0] chain;  // chain[k] is the cin of column k

  assign chain[0] = 1'b0;
  assign cy[0]    = 1'b0;

  for (genvar k = 0; k < PW; k++) begin : g_col
    if (k < APPROX_COLS && KIND == CMP_AFA) begin : g_afa
      afa_compressor42 u_cmp (
        .x1(r0[k]), .x2(r1[k]), .x3(r2[k]), .x4(r3[k]), .cin(chain[k]),
        .sum(s[k]), .carry(cy[k+1]), .cout(chain[k+1])
      );
    end else if (k < APPROX_COLS && KIND == CMP_MAJ) begin : g_maj
      majority_compressor42 u_cmp (
        .x1(r0[k]), .x2(r1[k]), .x3(r2[k]), .x4(r3[k]), .cin(chain[k]),
        .sum(s[k]), .carry(cy[k+1]), .cout(chain[k+1])
      );
    end else begin : g_exact
      exact_compressor42 u_cmp (
        .x1(r0[k]), .x2(r1[k]), .x3(r2[k]), .x4(r3[k]), .cin(chain[k]),
        .sum(s[k]), .carry(cy[k+1]), .cout(chain[k+1])
      );
    end
  end

  assign c = cy[PW-1:0];

  // The top column's carry and cout leave the product width unused.
  logic unused_top;
  assign unused_top = cy[PW] ^ chain[PW];
endmodule
