// Reference models for the multiplier testbenches, written with integer
// counting rather than gates.  kind: 0 exact, 1 almost-full-adder based,
// 2 majority based (same numbering as the design's compressor enum).
package tb_ref_pkg;

  // One 4:2 compressor; returns {sum, carry, cout}.
  function automatic logic [2:0] cmp_ref(input int kind, input int x1, x2, x3, x4, cin);
    int t, s, sum, carry, cout;
    case (kind)
      1: begin  // almost full adders: carry only when b and cin are both 1
        s     = (x1 + x2 + x3) % 2;
        cout  = (x2 + x3 == 2);
        sum   = (s + x4 + cin) % 2;
        carry = (x4 + cin == 2);
      end
      2: begin  // majority logic
        s     = (x3 + x4 + (1 - cin) >= 2) ? 0 : 1;
        sum   = (x1 + x2 + s >= 2);
        carry = x4;
        cout  = x3;
      end
      default: begin
        t     = x1 + x2 + x3;
        cout  = t / 2;
        t     = t % 2 + x4 + cin;
        sum   = t % 2;
        carry = t / 2;
      end
    endcase
    return {1'(sum), 1'(carry), 1'(cout)};
  endfunction

  // One reduction row over 16 columns; returns {s, c} with c already shifted.
  function automatic logic [31:0] row_ref(input int kind, input int approx_cols,
                                          input logic [15:0] r0, r1, r2, r3);
    logic [15:0] s = '0, c = '0;
    int cin = 0;
    logic [2:0] o;
    for (int k = 0; k < 16; k++) begin
      o = cmp_ref(k < approx_cols ? kind : 0, int'(r0[k]), int'(r1[k]), int'(r2[k]),
                  int'(r3[k]), cin);
      s[k] = o[2];
      if (k < 15) c[k+1] = o[1];
      cin = int'(o[0]);
    end
    return {s, c};
  endfunction

  // Whole multiplier.
  function automatic logic [15:0] mult_ref(input int a, b, trunc, approx_cols);
    logic [15:0] pp [8];
    logic [31:0] lo, hi, l2;
    for (int i = 0; i < 8; i++) begin
      pp[i] = '0;
      for (int j = 0; j < 8; j++)
        if (i + j >= trunc && ((a >> j) & 1) == 1 && ((b >> i) & 1) == 1) pp[i][i+j] = 1'b1;
    end
    lo = row_ref(1, approx_cols, pp[0], pp[1], pp[2], pp[3]);
    hi = row_ref(1, approx_cols, pp[4], pp[5], pp[6], pp[7]);
    l2 = row_ref(2, approx_cols, lo[31:16], lo[15:0], hi[31:16], hi[15:0]);
    return 16'(int'(l2[31:16]) + int'(l2[15:0]));
  endfunction

endpackage
