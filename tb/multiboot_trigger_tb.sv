// multiboot_trigger_tb: sends multiboot requests to several addresses into
// the ICAP model, once with BUSY always low and once with BUSY pulses, and
// checks the decoded target address and read opcode, the byte count, that
// bytes are held while BUSY is high, and the 20-clock sequence time.
module multiboot_trigger_tb;
  import auth_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, trigger = 1'b0;
  flash_addr_t target = '0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic       busy [2], done [2], ce_n [2], wr_n [2], ibusy [2];
  logic [7:0] din [2];

  for (genvar g = 0; g < 2; g++) begin : g_dut
    multiboot_trigger dut (.clk, .rst_n, .trigger, .target_addr(target), .busy(busy[g]), .done(done[g]),
      .icap_ce_n(ce_n[g]), .icap_write_n(wr_n[g]), .icap_din(din[g]), .icap_busy(ibusy[g]));
  end
  icap_model #(.BUSY_EVERY(0)) icap0 (.CLK(clk), .CE(ce_n[0]), .WRITE(wr_n[0]), .I(din[0]), .BUSY(ibusy[0]));
  icap_model #(.BUSY_EVERY(3)) icap1 (.CLK(clk), .CE(ce_n[1]), .WRITE(wr_n[1]), .I(din[1]), .BUSY(ibusy[1]));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int cycles;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 5; i++) begin
      flash_addr_t a;
      a = (i == 0) ? OTD_IMAGE_ADDR : 24'($urandom);
      @(negedge clk); target = a; trigger = 1'b1;
      @(negedge clk); trigger = 1'b0; target = ~a;
      cycles = 1;
      while (!(done[0]) && cycles < 200) begin @(negedge clk); cycles++; end
      check(cycles - 1 == 20, $sformatf("sequence took %0d clocks", cycles - 1));
      while (busy[1] && cycles < 400) begin @(negedge clk); cycles++; end
      repeat (2) @(negedge clk);
      check(icap0.iprog_count == i + 1 && icap1.iprog_count == i + 1, "IPROG not seen");
      check(icap0.iprog_addr == a, $sformatf("address %h expected %h", icap0.iprog_addr, a));
      check(icap1.iprog_addr == a, $sformatf("address with BUSY %h expected %h", icap1.iprog_addr, a));
      check(icap0.iprog_op == MB_SPI_READ_OP && icap1.iprog_op == MB_SPI_READ_OP, "read opcode");
      check(icap0.nbytes == 20 * (i + 1) && icap1.nbytes == 20 * (i + 1), "byte count");
    end
    check(icap1.busy_stalls > 0, "BUSY never held a byte");
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
