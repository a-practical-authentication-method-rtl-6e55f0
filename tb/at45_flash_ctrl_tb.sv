// at45_flash_ctrl_tb: runs read, program and erase commands against the
// DataFlash model and checks the data read back, that program and erase
// wait for the chip to become ready, and the read command's duration.
module at45_flash_ctrl_tb;
  import auth_pkg::*;
  localparam int unsigned HALF = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  logic req_valid = 1'b0, req_ready, done;
  flash_cmd_e req_cmd = FL_READ8;
  flash_addr_t req_addr = '0;
  check_t req_wdata = '0, rdata;
  logic cs_n, sclk, mosi, miso;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  at45_flash_ctrl #(.SPI_CLK_HALF(HALF)) dut (.clk, .rst_n, .req_valid, .req_ready, .req_cmd,
    .req_addr, .req_wdata, .done, .rdata, .spi_cs_n(cs_n), .spi_sclk(sclk), .spi_mosi(mosi), .spi_miso(miso));
  at45db_model #(.BUSY_DELAY(3000)) flash (.cs_n, .sclk, .mosi, .miso);

  task automatic op(input flash_cmd_e c, input flash_addr_t a, input check_t w, output int cycles);
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req_valid = 1'b1; req_cmd = c; req_addr = a; req_wdata = w;
    @(negedge clk);
    req_valid = 1'b0;
    cycles = 1;
    while (!done && cycles < 100000) begin @(negedge clk); cycles++; end
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int cyc;
    check_t v;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // blank memory reads all ones
    op(FL_READ8, DATA_SEG_ADDR, '0, cyc);
    check(rdata === '1, $sformatf("blank read %h", rdata));
    // 12 bytes of 16*HALF+2 clocks each, then the 4-clock CS gap
    check(cyc - 1 == 12 * (16*HALF + 2) + 4, $sformatf("read took %0d clocks", cyc - 1));
    // program and read back at several addresses
    for (int i = 0; i < 4; i++) begin
      flash_addr_t a;
      a = {3'b0, 12'($urandom), 9'd8 * 9'(i)};
      v = {$urandom, $urandom};
      op(FL_PROG8, a, v, cyc);
      check(flash.n_prog == i + 1, "program reached the flash");
      check(cyc * 10 > 3000, $sformatf("program done before flash ready (%0d clocks)", cyc));
      check(flash.busy == 1'b0, "flash still busy at done");
      op(FL_READ8, a, '0, cyc);
      check(rdata === v, $sformatf("read back %h expected %h", rdata, v));
      check(flash.rd(a) == v[63:56], "big-endian byte order");
      // erase the page again
      op(FL_ERASE, a, '0, cyc);
      check(flash.n_erase == i + 1, "erase reached the flash");
      check(flash.busy == 1'b0, "flash busy after erase done");
      op(FL_READ8, a, '0, cyc);
      check(rdata === '1, $sformatf("erased read %h", rdata));
    end
    check(flash.n_busy_reject == 0, "command sent while flash busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
