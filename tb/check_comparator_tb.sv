// check_comparator_tb: presents active and stored values in both orders, at
// the same time, equal and different (including a one-bit difference), and
// checks the verdict, its one-clock delay and that it never changes after.
module check_comparator_tb;
  import auth_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic av = 1'b0, sv = 1'b0, decided, auth;
  check_t a = '0, s = '0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  check_comparator dut (.clk, .rst_n, .active_valid(av), .active_value(a), .stored_valid(sv),
    .stored_value(s), .decided, .authenticated(auth));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic trial(input int order, input check_t va, input check_t vs);
    rst_n = 1'b0; @(negedge clk); rst_n = 1'b1;
    check(!decided, "decided after reset");
    if (order == 0) begin        // active first
      a = va; av = 1'b1; @(negedge clk); av = 1'b0; a = '0;
      repeat (3) @(negedge clk);
      check(!decided, "decided on one value");
      s = vs; sv = 1'b1; @(negedge clk); sv = 1'b0; s = '0;
    end else if (order == 1) begin  // stored first
      s = vs; sv = 1'b1; @(negedge clk); sv = 1'b0; s = '0;
      @(negedge clk);
      a = va; av = 1'b1; @(negedge clk); av = 1'b0; a = '0;
    end else begin               // together
      a = va; s = vs; av = 1'b1; sv = 1'b1; @(negedge clk); av = 1'b0; sv = 1'b0;
    end
    check(decided, "no decision one clock after the second value");
    check(auth === (va == vs), $sformatf("order %0d: auth=%b for %h vs %h", order, auth, va, vs));
    // later strobes must not change the verdict
    a = vs ^ 64'h1; s = vs; av = 1'b1; sv = 1'b1; @(negedge clk); av = 1'b0; sv = 1'b0;
    a = vs; @(negedge clk);
    check(auth === (va == vs), "verdict changed after decision");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    for (int i = 0; i < 12; i++) begin
      check_t x;
      x = {$urandom, $urandom};
      trial(i % 3, x, x);
      trial(i % 3, x, x ^ (64'h1 << (i * 5)));
      trial(i % 3, x, ~x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
