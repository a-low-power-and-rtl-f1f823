// Self-checking testbench of pp_generator: random operands and truncation
// amounts (0..16), each row compared bit by bit with a[j] & b[i] at column
// i+j, zero below the truncation column.  Also checks that the untruncated
// rows add up to a*b.
module tb_pp_generator;
  localparam int NVEC = 3000;

  logic [7:0]  a, b;
  logic [4:0]  trunc;
  logic [15:0] pp [8];
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  pp_generator dut (.a(a), .b(b), .trunc(trunc), .pp(pp));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NVEC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_bit;
    int total;
    for (int n = 0; n < NVEC; n++) begin
      a = 8'($urandom);
      b = 8'($urandom);
      trunc = 5'($urandom_range(0, 16));
      if (n < 17) trunc = 5'(n);
      @(posedge clk);
      total = 0;
      for (int i = 0; i < 8; i++) begin
        for (int col = 0; col < 16; col++) begin
          exp_bit = (col - i >= 0 && col - i < 8 && col >= int'(trunc)) ? (a[col-i] & b[i]) : 1'b0;
          checks++;
          if (pp[i][col] != exp_bit) begin
            failures++;
            $display("FAIL a=%0d b=%0d trunc=%0d row %0d col %0d", a, b, trunc, i, col);
          end
        end
        total += int'(pp[i]);
      end
      if (trunc == 0) begin
        checks++;
        if (total != int'(a) * int'(b)) begin
          failures++;
          $display("FAIL rows sum to %0d, a*b=%0d", total, int'(a) * int'(b));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
