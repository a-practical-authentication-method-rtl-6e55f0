// controller_design_tb: runs the controller image at its default sizes on a
// DataFlash model, a DNA port model and an ICAP model, in three situations:
// blank data segment (expects a multiboot to the one-time image and no
// enable), the device's own check value (expects the enable) and the check
// value of another device (expects auth_fail and no enable).
module controller_design_tb;
  import auth_pkg::*;
  import tb_ref_pkg::*;
  localparam logic [56:0] ID = 57'h15A_3C5A_5AA5_0F0F;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // asynchronous reset before the first clock edge
  logic cs_n, sclk, mosi, miso, dclk, dread, dshift, ddin, ddout, ce_n, wr_n, ibusy;
  logic [7:0] idin;
  logic ds_blank, mb_sent, enable, fail;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;  // 50 MHz

  controller_design dut (.clk, .rst_n, .spi_cs_n(cs_n), .spi_sclk(sclk), .spi_mosi(mosi), .spi_miso(miso),
    .dna_clk(dclk), .dna_read(dread), .dna_shift(dshift), .dna_din(ddin), .dna_dout(ddout),
    .icap_ce_n(ce_n), .icap_write_n(wr_n), .icap_din(idin), .icap_busy(ibusy),
    .ds_blank, .multiboot_sent(mb_sent), .design_enable(enable), .auth_fail(fail));
  at45db_model flash (.cs_n, .sclk, .mosi, .miso);
  dna_port_model #(.DNA_VALUE(ID)) dna (.CLK(dclk), .READ(dread), .SHIFT(dshift), .DIN(ddin), .DOUT(ddout));
  icap_model #(.BUSY_EVERY(5)) icap (.CLK(clk), .CE(ce_n), .WRITE(wr_n), .I(idin), .BUSY(ibusy));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic store(input check_t v);
    for (int i = 0; i < 8; i++) flash.wr(DATA_SEG_ADDR + 24'(i), v[63 - 8*i -: 8]);
  endtask

  task automatic boot(output int cycles);
    rst_n = 1'b0; repeat (2) @(negedge clk); rst_n = 1'b1;
    cycles = 0;
    while (!(mb_sent || enable || fail) && cycles < 20000) begin @(negedge clk); cycles++; end
    repeat (20) @(negedge clk);
  endtask

  initial begin
    int cyc;
    // 1: blank data segment
    boot(cyc);
    check(ds_blank && mb_sent, "no multiboot on blank segment");
    check(icap.iprog_count == 1 && icap.iprog_addr == OTD_IMAGE_ADDR, "multiboot target");
    check(!enable && !fail, "decision on blank segment");
    // 2: own check value
    store(ref_check(ID, DEFAULT_KEY));
    boot(cyc);
    check(enable && !fail, "own device not authenticated");
    check(!ds_blank && icap.iprog_count == 1, "multiboot on a stored value");
    // the DNA read (about 115*25 clocks) dominates; the flash read runs in parallel
    check(cyc < (1 + 2*57) * 25 + 200, $sformatf("authentication took %0d clocks", cyc));
    // 3: another device's value
    store(ref_check(ID ^ 57'h1, DEFAULT_KEY));
    boot(cyc);
    check(fail && !enable, "foreign value accepted");
    // 4: right DNA, other key
    store(ref_check(ID, ~DEFAULT_KEY));
    boot(cyc);
    check(fail && !enable, "value under another key accepted");
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
