// dna_port_reader_tb: reads several identifiers from the DNA port model and
// checks the padded value, the DNA clock rate and the total read time.
module dna_port_reader_tb;
  localparam int unsigned HALF = 3;
  localparam logic [56:0] ID = 57'h1A5_F00D_CAFE_1234;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, done, dclk, dread, dshift, ddin, ddout;
  logic [63:0] dna;
  int checks = 0, failures = 0;
  int edges = 0;

  always #5 clk = ~clk;

  dna_port_reader #(.CLK_HALF(HALF)) dut (
    .clk, .rst_n, .start, .busy, .done, .dna,
    .dna_clk(dclk), .dna_read(dread), .dna_shift(dshift), .dna_din(ddin), .dna_dout(ddout));
  dna_port_model #(.DNA_VALUE(ID)) port (.CLK(dclk), .READ(dread), .SHIFT(dshift), .DIN(ddin), .DOUT(ddout));

  always @(posedge dclk) edges++;

  initial begin
    int cycles;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 2; r++) begin
      edges = 0;
      @(negedge clk); start = 1'b1;
      @(negedge clk); start = 1'b0;
      cycles = 1;
      while (!done && cycles < 5000) begin @(negedge clk); cycles++; end
      checks++;
      if (dna !== {7'b0, ID}) begin failures++; $display("FAIL dna=%h", dna); end
      checks++;
      if (edges != 57) begin failures++; $display("FAIL %0d DNA clocks, expected 57", edges); end
      checks++;
      if (cycles - 1 != (1 + 2*57) * HALF + 1) begin
        failures++; $display("FAIL read took %0d clocks", cycles - 1);
      end
      checks++;
      if (busy) begin failures++; $display("FAIL still busy"); end
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
