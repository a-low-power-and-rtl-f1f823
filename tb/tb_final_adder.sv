// Self-checking testbench of final_adder: corner cases and random pairs,
// checked against x + y modulo 2^16.
module tb_final_adder;
  localparam int NVEC = 5000;

  logic [15:0] x, y, p;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  final_adder dut (.x(x), .y(y), .p(p));

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
      x = 16'($urandom);
      y = 16'($urandom);
      if (n == 0) {x, y} = {16'hffff, 16'h0001};   // full carry ripple
      if (n == 1) {x, y} = {16'hffff, 16'hffff};
      if (n == 2) {x, y} = '0;
      @(posedge clk);
      checks++;
      if (int'(p) != (int'(x) + int'(y)) % 65536) begin
        failures++;
        $display("FAIL %h + %h -> %h", x, y, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
