// Final carry-propagate adder of the multiplier.
//
// Adds the sum row x and the carry row y of the last reduction level into the
// PW-bit product p = (x + y) mod 2^PW, as a ripple chain of exact full
// adders.  Purely combinational; its delay grows with PW.  The adder type is
// this implementation's choice: the reference design only shows a carry
// chain in the final addition.
module final_adder #(
  parameter int unsigned PW = approx_mult_pkg::MULT_PW
) (
  input  logic [PW-1:0] x,
  input  logic [PW-1:0] y,
  output logic [PW-1:0] p
);
  logic [PW:0] c;

  assign c[0] = 1'b0;
  for (genvar k = 0; k < PW; k++) begin : g_bit
    full_adder u_fa (.a(x[k]), .b(y[k]), .c(c[k]), .sum(p[k]), .carry(c[k+1]));
  end

  // Carry out of the top bit is beyond the product width.
  logic unused_cout;
  assign unused_cout = c[PW];
endmodule
