// Self-checking testbench of afa_compressor42: all 32 input patterns.  The
// expected outputs come from chaining the almost-full-adder truth table
// (sum = parity, carry = 1 only for inputs 011 and 111) by table lookup, and
// the error of the compressed value against the true bit count is checked to
// be never positive (the almost full adder only drops carries).
module tb_afa_compressor42;
  localparam logic [7:0] CARRY_TT = 8'b1000_1000;  // indexed {a, b, cin}

  logic x1, x2, x3, x4, cin, sum, carry, cout;
  int checks = 0, failures = 0, exact_cases = 0;
  logic clk = 1'b0;

  afa_compressor42 dut (
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
    logic s_e, sum_e, carry_e, cout_e;
    int value;
    for (int v = 0; v < 32; v++) begin
      {x1, x2, x3, x4, cin} = 5'(v);
      s_e     = x1 ^ x2 ^ x3;
      cout_e  = CARRY_TT[{x1, x2, x3}];
      sum_e   = s_e ^ x4 ^ cin;
      carry_e = CARRY_TT[{s_e, x4, cin}];
      @(posedge clk);
      checks++;
      if ({sum, carry, cout} !== {sum_e, carry_e, cout_e}) begin
        failures++;
        $display("FAIL in=%05b -> sum=%0b carry=%0b cout=%0b, expected %0b %0b %0b",
                 v[4:0], sum, carry, cout, sum_e, carry_e, cout_e);
      end
      value = int'(sum) + 2 * (int'(carry) + int'(cout));
      checks++;
      if (value > $countones(v[4:0])) begin
        failures++;
        $display("FAIL in=%05b overestimates: %0d", v[4:0], value);
      end
      if (value == $countones(v[4:0])) exact_cases++;
    end
    $display("exact on %0d of 32 input patterns", exact_cases);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
