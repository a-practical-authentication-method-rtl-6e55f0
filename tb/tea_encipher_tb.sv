// tea_encipher_tb: checks the TEA core against a published test vector and
// against a behavioural reference written as a plain loop, for random keys
// and blocks. Also checks the 32-clock latency and that busy blocks restarts.
module tea_encipher_tb;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [63:0] pt = '0;
  logic [127:0] key = '0;
  logic busy, done;
  logic [63:0] ct;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tea_encipher dut (.clk, .rst_n, .start, .plaintext(pt), .key, .busy, .done, .ciphertext(ct));

  function automatic logic [63:0] ref_tea(input logic [63:0] p, input logic [127:0] k);
    logic [31:0] y, z, s;
    y = p[63:32]; z = p[31:0]; s = 0;
    for (int i = 0; i < 32; i++) begin
      s += 32'h9E3779B9;
      y += ((z << 4) + k[127:96]) ^ (z + s) ^ ((z >> 5) + k[95:64]);
      z += ((y << 4) + k[63:32]) ^ (y + s) ^ ((y >> 5) + k[31:0]);
    end
    return {y, z};
  endfunction

  task automatic run(input logic [63:0] p, input logic [127:0] k, input logic [63:0] expect_ct);
    int cycles;
    @(negedge clk);
    pt = p; key = k; start = 1'b1;
    @(negedge clk);
    start = 1'b0; pt = ~p; key = ~k;  // inputs may change after start
    cycles = 1;
    while (!done && cycles < 100) begin
      // a second start while busy must be ignored
      if (cycles == 5) start = 1'b1; else start = 1'b0;
      @(negedge clk); cycles++;
    end
    start = 1'b0;
    checks++;
    if (ct !== expect_ct) begin
      failures++;
      $display("FAIL ct=%h expected %h", ct, expect_ct);
    end
    checks++;
    if (cycles - 1 != 32) begin
      failures++;
      $display("FAIL latency %0d clocks, expected 32", cycles - 1);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Published TEA vector: all-zero key and block.
    run(64'h0, 128'h0, 64'h41EA3A0A_94BAA940);
    for (int i = 0; i < 20; i++) begin
      logic [63:0] p; logic [127:0] k;
      p = {$urandom, $urandom};
      k = {$urandom, $urandom, $urandom, $urandom};
      run(p, k, ref_tea(p, k));
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
