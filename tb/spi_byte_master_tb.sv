// spi_byte_master_tb: a loop-back slave shifts back on MISO the byte it
// received in the previous transfer. Checks MOSI bits sampled on rising SCLK,
// the received byte, mode-0 idle level and the per-byte time.
module spi_byte_master_tb;
  localparam int unsigned HALF = 2;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [7:0] tx = '0, rx;
  logic busy, done, sclk, mosi, miso;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  spi_byte_master #(.CLK_HALF(HALF)) dut (.clk, .rst_n, .start, .tx_byte(tx), .busy, .done,
    .rx_byte(rx), .sclk, .mosi, .miso);

  // Slave: captures MOSI on rising edges; drives MISO from its out register,
  // changing after falling edges.
  logic [7:0] slave_in = '0, slave_out = '0;
  int sbits = 0;
  always @(posedge sclk) begin slave_in = {slave_in[6:0], mosi}; sbits++; end
  always @(negedge sclk) slave_out = {slave_out[6:0], 1'b0};
  assign miso = slave_out[7];

  initial begin
    logic [7:0] prev;
    int cycles;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    prev = 8'h00;
    for (int i = 0; i < 12; i++) begin
      logic [7:0] b;
      b = (i == 0) ? 8'hA5 : 8'($urandom);
      slave_out = prev; sbits = 0;
      @(negedge clk); tx = b; start = 1'b1;
      @(negedge clk); start = 1'b0;
      cycles = 1;
      while (!done && cycles < 500) begin @(negedge clk); cycles++; end
      checks++;
      if (slave_in !== b || sbits != 8) begin failures++; $display("FAIL slave got %h (%0d bits), sent %h", slave_in, sbits, b); end
      checks++;
      if (rx !== prev) begin failures++; $display("FAIL rx=%h expected %h", rx, prev); end
      checks++;
      if (cycles - 1 != 16*HALF) begin failures++; $display("FAIL byte took %0d clocks", cycles - 1); end
      checks++;
      if (sclk !== 1'b0) begin failures++; $display("FAIL sclk not idle low"); end
      prev = b;
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
