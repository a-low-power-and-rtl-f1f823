// Self-checking testbench of compressor42_row.  Three rows run side by side
// on the same random inputs: an all-exact row (APPROX_COLS = 0), checked
// against the plain sum r0+r1+r2+r3 = s+c (mod 2^16); and an
// almost-full-adder row and a majority row with 8 approximate columns,
// checked against the counting model in tb_ref_pkg.
module tb_compressor42_row;
  import approx_mult_pkg::*;
  import tb_ref_pkg::*;

  localparam int NVEC = 2000;

  logic [15:0] r0, r1, r2, r3;
  logic [15:0] se, ce, sa, ca, sm, cm;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  compressor42_row #(.PW(16), .KIND(CMP_EXACT), .APPROX_COLS(0)) u_exact (
    .r0(r0), .r1(r1), .r2(r2), .r3(r3), .s(se), .c(ce));
  compressor42_row #(.PW(16), .KIND(CMP_AFA), .APPROX_COLS(8)) u_afa (
    .r0(r0), .r1(r1), .r2(r2), .r3(r3), .s(sa), .c(ca));
  compressor42_row #(.PW(16), .KIND(CMP_MAJ), .APPROX_COLS(8)) u_maj (
    .r0(r0), .r1(r1), .r2(r2), .r3(r3), .s(sm), .c(cm));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NVEC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < NVEC; n++) begin
      {r0, r1, r2, r3} = {$urandom, $urandom};
      if (n == 0) {r0, r1, r2, r3} = '1;
      @(posedge clk);
      checks++;
      if (16'(se + ce) != 16'(r0 + r1 + r2 + r3)) begin
        failures++;
        $display("FAIL exact row: %h+%h+%h+%h -> s=%h c=%h", r0, r1, r2, r3, se, ce);
      end
      checks++;
      if ({sa, ca} != row_ref(1, 8, r0, r1, r2, r3)) begin
        failures++;
        $display("FAIL afa row: %h %h %h %h -> s=%h c=%h", r0, r1, r2, r3, sa, ca);
      end
      checks++;
      if ({sm, cm} != row_ref(2, 8, r0, r1, r2, r3)) begin
        failures++;
        $display("FAIL maj row: %h %h %h %h -> s=%h c=%h", r0, r1, r2, r3, sm, cm);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
