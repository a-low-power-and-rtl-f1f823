// Self-checking testbench of majority_compressor42: all 32 input patterns
// against the gate-level equations written with counting instead of logic
// (a three-input majority is "at least two of three are 1").
module tb_majority_compressor42;
  logic x1, x2, x3, x4, cin, sum, carry, cout;
  int checks = 0, failures = 0, exact_cases = 0;
  logic clk = 1'b0;

  majority_compressor42 dut (
    .x1(x1), .x2(x2), .x3(x3), .x4(x4), .cin(cin),
    .sum(sum), .carry(carry), .cout(cout)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic s_e, sum_e;
    for (int v = 0; v < 32; v++) begin
      {x1, x2, x3, x4, cin} = 5'(v);
      s_e   = !((int'(x3) + int'(x4) + int'(!cin)) >= 2);
      sum_e = (int'(x1) + int'(s_e) + int'(x2)) >= 2;
      @(posedge clk);
      checks++;
      if ({sum, carry, cout} !== {sum_e, x4, x3}) begin
        failures++;
        $display("FAIL in=%05b -> sum=%0b carry=%0b cout=%0b", v[4:0], sum, carry, cout);
      end
      if (int'(sum) + 2 * (int'(carry) + int'(cout)) == $countones(v[4:0])) exact_cases++;
    end
    // All-zero input must compress to zero.
    {x1, x2, x3, x4, cin} = '0;
    @(posedge clk);
    checks++;
    if ({sum, carry, cout} != 3'b000) begin
      failures++;
      $display("FAIL all-zero input gives nonzero output");
    end
    $display("exact on %0d of 32 input patterns", exact_cases);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
