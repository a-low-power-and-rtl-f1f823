// Testbench of approx_multiplier with APPROX_COLS = 0, i.e. every compressor
// exact.  With trunc = 0 the product must equal A*B for all 65,536 operand
// pairs; with random truncation it must equal the exact sum of the partial
// products that are kept (those in columns at or above trunc).
module tb_approx_multiplier_exact;
  localparam int NTRUNC = 5000;

  logic [7:0]  A, B;
  logic [4:0]  trunc;
  logic [15:0] P;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  approx_multiplier #(.APPROX_COLS(0)) dut (.A(A), .B(B), .trunc(trunc), .P(P));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (65536 + NTRUNC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int kept;
    for (int a = 0; a < 256; a++) begin
      for (int b = 0; b < 256; b++) begin
        A = 8'(a);
        B = 8'(b);
        trunc = '0;
        @(posedge clk);
        checks++;
        if (int'(P) != a * b) begin
          failures++;
          if (failures < 10) $display("FAIL %0d*%0d -> %0d", a, b, P);
        end
      end
    end
    for (int n = 0; n < NTRUNC; n++) begin
      A = 8'($urandom);
      B = 8'($urandom);
      trunc = 5'($urandom_range(0, 16));
      @(posedge clk);
      kept = 0;
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++)
          if (A[j] && B[i] && i + j >= int'(trunc)) kept += 1 << (i + j);
      checks++;
      if (int'(P) != kept) begin
        failures++;
        if (failures < 10) $display("FAIL %0d*%0d trunc=%0d -> %0d expected %0d", A, B, trunc, P, kept);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
