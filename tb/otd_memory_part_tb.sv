// otd_memory_part_tb: the memory part drives the flash engine and the
// DataFlash model. Checks that the value lands in the data segment, that the
// start page of the one-time image is erased afterwards (and nothing else),
// the order of the two steps and that each waits for the flash to be ready.
module otd_memory_part_tb;
  import auth_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, done, written, erased;
  check_t value = '0;
  logic fl_valid, fl_ready, fl_done;
  flash_cmd_e fl_cmd;
  flash_addr_t fl_addr;
  check_t fl_wdata, fl_rdata;
  logic cs_n, sclk, mosi, miso;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  otd_memory_part dut (.clk, .rst_n, .start, .value, .busy, .done, .written, .erased,
    .fl_valid, .fl_ready, .fl_cmd, .fl_addr, .fl_wdata, .fl_done, .fl_rdata);
  at45_flash_ctrl fl (.clk, .rst_n, .req_valid(fl_valid), .req_ready(fl_ready), .req_cmd(fl_cmd),
    .req_addr(fl_addr), .req_wdata(fl_wdata), .done(fl_done), .rdata(fl_rdata),
    .spi_cs_n(cs_n), .spi_sclk(sclk), .spi_mosi(mosi), .spi_miso(miso));
  at45db_model #(.BUSY_DELAY(5000)) flash (.cs_n, .sclk, .mosi, .miso);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // the erase must come after the program has finished
  int order_errors = 0;
  always @(posedge clk) if (flash.n_erase > 0 && flash.n_prog == 0) order_errors++;

  initial begin
    check_t v, got;
    int cycles;
    v = {$urandom, $urandom};
    // bitstream stand-ins in both image areas
    for (int i = 0; i < 16; i++) begin
      flash.wr(OTD_IMAGE_ADDR + 24'(i), 8'(i + 1));
      flash.wr(OTD_IMAGE_ADDR + 24'd512 + 24'(i), 8'(i + 1));
      flash.wr(CD_IMAGE_ADDR + 24'(i), 8'(i + 1));
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk); value = v; start = 1'b1;
    @(negedge clk); start = 1'b0; value = '0;
    cycles = 1;
    while (!done && cycles < 20000) begin
      @(negedge clk); cycles++;
      if (!written && flash.n_erase != 0) check(0, "erase before the write finished");
    end
    for (int i = 0; i < 8; i++) got[63 - 8*i -: 8] = flash.rd(DATA_SEG_ADDR + 24'(i));
    check(got === v, $sformatf("data segment %h expected %h", got, v));
    check(written && erased, "status flags");
    check(flash.n_prog == 1 && flash.n_erase == 1, "one program, one erase");
    check(order_errors == 0, "erase issued before program");
    check(flash.rd(OTD_IMAGE_ADDR) == 8'hFF && flash.rd(OTD_IMAGE_ADDR + 24'd15) == 8'hFF,
          "start page of the one-time image not erased");
    check(flash.rd(OTD_IMAGE_ADDR + 24'd512) == 8'h01, "second page of the image touched");
    check(flash.rd(CD_IMAGE_ADDR + 24'd3) == 8'h04, "controller image touched");
    check(cycles * 10 > 2 * 5000, "did not wait for the flash to be ready");
    check(flash.n_busy_reject == 0, "command while flash busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
