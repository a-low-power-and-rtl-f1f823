// Self-checking testbench of almost_full_adder: all eight input patterns
// against a truth table written out by hand.  Rows are indexed {a, b, cin};
// the sum is the parity and the carry is 1 only in rows 011 and 111.  It
// also counts the rows where the carry differs from an exact full adder
// (expected: 101 and 110).
module tb_almost_full_adder;
  localparam logic [7:0] SUM_TT   = 8'b1001_0110;
  localparam logic [7:0] CARRY_TT = 8'b1000_1000;
  localparam logic [7:0] EXACT_CARRY_TT = 8'b1110_1000;

  logic a, b, cin, sum, carry;
  int checks = 0, failures = 0, inexact = 0;
  logic clk = 1'b0;

  almost_full_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .carry(carry));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = 3'(v);
      @(posedge clk);
      checks++;
      if (sum !== SUM_TT[v] || carry !== CARRY_TT[v]) begin
        failures++;
        $display("FAIL abc=%03b -> sum=%0b carry=%0b", v[2:0], sum, carry);
      end
      if (carry != EXACT_CARRY_TT[v]) inexact++;
    end
    checks++;
    if (inexact != 2) begin
      failures++;
      $display("FAIL %0d rows differ from an exact adder, expected 2", inexact);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
