// Self-checking testbench of exact_compressor42: all 32 input patterns,
// checked against x1+x2+x3+x4+cin = sum + 2*(carry+cout), and that cout
// does not change when only cin changes.
module tb_exact_compressor42;
  logic x1, x2, x3, x4, cin, sum, carry, cout;
  logic cout_cin0;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  exact_compressor42 dut (
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
    for (int v = 0; v < 32; v++) begin
      {x1, x2, x3, x4, cin} = 5'(v);
      @(posedge clk);
      checks++;
      if (int'(sum) + 2 * (int'(carry) + int'(cout)) != $countones(v[4:0])) begin
        failures++;
        $display("FAIL in=%05b -> sum=%0b carry=%0b cout=%0b", v[4:0], sum, carry, cout);
      end
      if (cin == 1'b0) cout_cin0 = cout;
      else begin
        checks++;
        if (cout != cout_cin0) begin
          failures++;
          $display("FAIL cout depends on cin for in=%05b", v[4:0]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
