// dna_encryptor_tb: two encryptors with different keys read the same DNA
// port model; checks the padded DNA, both ciphertexts against the reference
// TEA, that the keys give different values, and the total time.
module dna_encryptor_tb;
  import auth_pkg::*;
  import tb_ref_pkg::*;
  localparam int unsigned HALF = 2;
  localparam logic [56:0] ID = 57'h0DE_ADBE_EF01_2345;
  localparam logic [127:0] K2 = 128'h0123_4567_89AB_CDEF_FEDC_BA98_7654_3210;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy [2], done [2], dclk [2], dread [2], dshift [2], ddin [2], ddout [2];
  check_t dna [2], value [2];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dna_encryptor #(.DNA_CLK_HALF(HALF)) dut0 (.clk, .rst_n, .start, .busy(busy[0]), .done(done[0]),
    .dna(dna[0]), .value(value[0]), .dna_clk(dclk[0]), .dna_read(dread[0]), .dna_shift(dshift[0]),
    .dna_din(ddin[0]), .dna_dout(ddout[0]));
  dna_encryptor #(.KEY(K2), .DNA_CLK_HALF(HALF)) dut1 (.clk, .rst_n, .start, .busy(busy[1]), .done(done[1]),
    .dna(dna[1]), .value(value[1]), .dna_clk(dclk[1]), .dna_read(dread[1]), .dna_shift(dshift[1]),
    .dna_din(ddin[1]), .dna_dout(ddout[1]));
  dna_port_model #(.DNA_VALUE(ID)) port0 (.CLK(dclk[0]), .READ(dread[0]), .SHIFT(dshift[0]), .DIN(ddin[0]), .DOUT(ddout[0]));
  dna_port_model #(.DNA_VALUE(ID)) port1 (.CLK(dclk[1]), .READ(dread[1]), .SHIFT(dshift[1]), .DIN(ddin[1]), .DOUT(ddout[1]));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int cycles;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 2; r++) begin
      @(negedge clk); start = 1'b1;
      @(negedge clk); start = 1'b0;
      cycles = 1;
      while (!done[0] && cycles < 5000) begin @(negedge clk); cycles++; end
      check(dna[0] === {7'b0, ID}, $sformatf("dna %h", dna[0]));
      check(value[0] === ref_check(ID, DEFAULT_KEY), $sformatf("value %h expected %h", value[0], ref_check(ID, DEFAULT_KEY)));
      check(value[1] === ref_check(ID, K2), $sformatf("value with key 2 %h", value[1]));
      check(value[0] !== value[1], "keys gave the same value");
      // DNA read, one clock into the cipher, 32 rounds
      check(cycles - 1 == ((1 + 2*57) * HALF + 1) + 1 + 32, $sformatf("took %0d clocks", cycles - 1));
      @(negedge clk);
      check(!busy[0], "still busy");
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
