// Self-checking testbench of approx_mult_pkg: the width constants, the
// compressor-kind encoding, and maj3 on all eight inputs against the rule
// "at least two of the three inputs are 1".
module tb_approx_mult_pkg;
  import approx_mult_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] v;
    checks++;
    if (MULT_N != 8 || MULT_PW != 16) begin
      failures++;
      $display("FAIL widths %0d %0d", MULT_N, MULT_PW);
    end
    checks++;
    if (CMP_EXACT == CMP_AFA || CMP_AFA == CMP_MAJ || CMP_EXACT == CMP_MAJ) begin
      failures++;
      $display("FAIL compressor kinds are not distinct");
    end
    for (int i = 0; i < 8; i++) begin
      v = 3'(i);
      @(posedge clk);
      checks++;
      if (maj3(v[2], v[1], v[0]) != ($countones(v) >= 2)) begin
        failures++;
        $display("FAIL maj3(%03b)", v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
