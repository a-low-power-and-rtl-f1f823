// End-to-end testbench of approx_multiplier at its default parameters.
//
// Pass 1 applies all 65,536 operand pairs with trunc = 0 and compares P with
// the counting model in tb_ref_pkg; it also accumulates the mean absolute
// error against the exact product and counts exact and inexact results.
// Pass 2 applies random operands with random truncation amounts 1..16 and
// compares again, counting how often truncation changed the product.
// Finally the operand pairs of the reference design's evaluation table are
// printed with the exact and approximate products.  Each mechanism (exact
// result, approximate result, truncation effect, full truncation to zero)
// must occur at least once.
module tb_approx_multiplier;
  import tb_ref_pkg::*;

  localparam int NTRUNC = 20000;

  logic [7:0]  A, B;
  logic [4:0]  trunc;
  logic [15:0] P;
  int checks = 0, failures = 0;
  int n_exact = 0, n_approx = 0, n_trunc_effect = 0, n_zeroed = 0;
  longint abs_err_sum = 0;
  logic clk = 1'b0;

  approx_multiplier dut (.A(A), .B(B), .trunc(trunc), .P(P));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (65536 + NTRUNC + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply_and_check(input int a, input int b, input int t);
    logic [15:0] exp_p;
    A = 8'(a);
    B = 8'(b);
    trunc = 5'(t);
    @(posedge clk);
    exp_p = mult_ref(a, b, t, 8);
    checks++;
    if (P !== exp_p) begin
      failures++;
      if (failures < 10)
        $display("FAIL A=%0d B=%0d trunc=%0d: P=%0d expected %0d", a, b, t, P, exp_p);
    end
  endtask

  initial begin
    int a, b, t, e;
    logic [15:0] p_full;
    // Pass 1: exhaustive, no truncation.
    for (a = 0; a < 256; a++) begin
      for (b = 0; b < 256; b++) begin
        apply_and_check(a, b, 0);
        e = int'(P) - a * b;
        abs_err_sum += (e < 0) ? -e : e;
        if (e == 0) n_exact++;
        else n_approx++;
      end
    end
    $display("trunc=0: %0d exact, %0d inexact, mean |error| = %0.2f",
             n_exact, n_approx, real'(abs_err_sum) / 65536.0);

    // Pass 2: random truncation.
    for (int n = 0; n < NTRUNC; n++) begin
      a = int'($urandom_range(0, 255));
      b = int'($urandom_range(0, 255));
      t = int'($urandom_range(1, 16));
      p_full = mult_ref(a, b, 0, 8);
      apply_and_check(a, b, t);
      if (P != p_full) n_trunc_effect++;
      if (t == 16 && P == 0) n_zeroed++;
    end
    $display("truncation changed the product in %0d of %0d cases; %0d fully truncated to 0",
             n_trunc_effect, NTRUNC, n_zeroed);

    // Evaluation-table operand pairs.
    foreach (eval_a[i]) begin
      A = eval_a[i];
      B = eval_b[i];
      trunc = '0;
      @(posedge clk);
      $display("A=%0d B=%0d exact=%0d approximate=%0d", A, B, int'(A) * int'(B), P);
    end

    checks++;
    if (n_exact == 0) begin failures++; $display("FAIL no exact result seen"); end
    checks++;
    if (n_approx == 0) begin failures++; $display("FAIL no approximate result seen"); end
    checks++;
    if (n_trunc_effect == 0) begin failures++; $display("FAIL truncation never mattered"); end
    checks++;
    if (n_zeroed == 0) begin failures++; $display("FAIL full truncation never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [7:0] eval_a [6] = '{8'd255, 8'd8, 8'd15, 8'd15, 8'd12, 8'd12};
  localparam logic [7:0] eval_b [6] = '{8'd255, 8'd3, 8'd15, 8'd14, 8'd15, 8'd12};
endmodule
