// one_time_design_tb: runs the one-time image at its default sizes on the
// DataFlash, DNA port and ICAP models. Checks the value written to the data
// segment against the reference TEA of the padded DNA, that the image's
// start page is erased while the controller image is untouched, and that it
// finally reconfigures the device from the controller image's address.
module one_time_design_tb;
  import auth_pkg::*;
  import tb_ref_pkg::*;
  localparam logic [56:0] ID = 57'h0C0_FFEE_1234_5678;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // asynchronous reset before the first clock edge
  logic cs_n, sclk, mosi, miso, dclk, dread, dshift, ddin, ddout, ce_n, wr_n, ibusy;
  logic [7:0] idin;
  logic written, erased, mb_sent;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  one_time_design dut (.clk, .rst_n, .spi_cs_n(cs_n), .spi_sclk(sclk), .spi_mosi(mosi), .spi_miso(miso),
    .dna_clk(dclk), .dna_read(dread), .dna_shift(dshift), .dna_din(ddin), .dna_dout(ddout),
    .icap_ce_n(ce_n), .icap_write_n(wr_n), .icap_din(idin), .icap_busy(ibusy),
    .check_written(written), .self_erased(erased), .multiboot_sent(mb_sent));
  at45db_model flash (.cs_n, .sclk, .mosi, .miso);
  dna_port_model #(.DNA_VALUE(ID)) dna (.CLK(dclk), .READ(dread), .SHIFT(dshift), .DIN(ddin), .DOUT(ddout));
  icap_model icap (.CLK(clk), .CE(ce_n), .WRITE(wr_n), .I(idin), .BUSY(ibusy));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    check_t got;
    int cycles;
    for (int i = 0; i < 4; i++) begin
      flash.wr(CD_IMAGE_ADDR + 24'(i), 8'hA0 + 8'(i));
      flash.wr(OTD_IMAGE_ADDR + 24'(i), 8'hB0 + 8'(i));
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    cycles = 0;
    while (!mb_sent && cycles < 50000) begin @(negedge clk); cycles++; end
    for (int i = 0; i < 8; i++) got[63 - 8*i -: 8] = flash.rd(DATA_SEG_ADDR + 24'(i));
    check(got === ref_check(ID, DEFAULT_KEY), $sformatf("stored %h expected %h", got, ref_check(ID, DEFAULT_KEY)));
    check(written && erased && mb_sent, "status flags");
    check(flash.rd(OTD_IMAGE_ADDR) == 8'hFF, "start page not erased");
    check(flash.rd(CD_IMAGE_ADDR) == 8'hA0, "controller image damaged");
    check(icap.iprog_count == 1 && icap.iprog_addr == CD_IMAGE_ADDR,
          $sformatf("multiboot back to the controller image (%0d, %h, %0d bytes)", icap.iprog_count, icap.iprog_addr, icap.nbytes));
    check(flash.n_prog == 1 && flash.n_erase == 1, "program/erase counts");
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
