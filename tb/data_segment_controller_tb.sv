// data_segment_controller_tb: the controller reads the data segment through
// the flash engine from the DataFlash model. Checks the blank verdict on an
// erased segment, and the stored value and non-blank verdict after values
// (including one with a single byte different from 0xFF) are preloaded.
module data_segment_controller_tb;
  import auth_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, done, blank;
  check_t stored;
  logic fl_valid, fl_ready, fl_done;
  flash_cmd_e fl_cmd;
  flash_addr_t fl_addr;
  check_t fl_wdata, fl_rdata;
  logic cs_n, sclk, mosi, miso;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  data_segment_controller dut (.clk, .rst_n, .start, .busy, .done, .blank, .stored_value(stored),
    .fl_valid, .fl_ready, .fl_cmd, .fl_addr, .fl_wdata, .fl_done, .fl_rdata);
  at45_flash_ctrl fl (.clk, .rst_n, .req_valid(fl_valid), .req_ready(fl_ready), .req_cmd(fl_cmd),
    .req_addr(fl_addr), .req_wdata(fl_wdata), .done(fl_done), .rdata(fl_rdata),
    .spi_cs_n(cs_n), .spi_sclk(sclk), .spi_mosi(mosi), .spi_miso(miso));
  at45db_model flash (.cs_n, .sclk, .mosi, .miso);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run();
    int cycles;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    cycles = 0;
    while (!done && cycles < 5000) begin @(negedge clk); cycles++; end
    check(done, "no done");
  endtask

  task automatic preload(input check_t v);
    for (int i = 0; i < 8; i++) flash.wr(DATA_SEG_ADDR + 24'(i), v[63 - 8*i -: 8]);
  endtask

  initial begin
    check_t v;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run();
    check(blank === 1'b1, "erased segment not blank");
    check(stored === '1, "erased segment value");
    check(flash.n_read == 1, "one read command");
    for (int i = 0; i < 6; i++) begin
      v = (i == 0) ? 64'hFFFF_FFFF_FFFF_FF7F : {$urandom, $urandom};
      preload(v);
      run();
      check(blank === 1'b0, $sformatf("value %h taken as blank", v));
      check(stored === v, $sformatf("stored %h expected %h", stored, v));
    end
    // other pages must not matter
    flash.erase_page(DATA_SEG_ADDR);
    flash.wr(DATA_SEG_ADDR - 24'd1, 8'h00);
    flash.wr(DATA_SEG_ADDR + 24'd8, 8'h00);
    run();
    check(blank === 1'b1, "neighbouring bytes read");
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
