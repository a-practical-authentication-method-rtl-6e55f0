// fpga_auth_top_tb: end-to-end run of the authentication scheme with both
// images at their default parameters.
//
// The testbench plays the board and the FPGA's configuration logic. One
// DataFlash model holds the memory map: a marker byte at the start of each
// image area stands for a bitstream, the data segment is blank. Power-up
// loads the controller image (its reset is released, the one-time image held
// in reset). When the loaded image sends an IPROG through ICAP, the
// configuration logic loads the image at the requested address if its start
// page is intact, and otherwise counts a failed configuration and falls back
// to the controller image. Two DNA port models stand for two devices.
//
// Scenarios, in order:
//   1 first power-up of board A: blank segment -> multiboot to the one-time
//     image -> check value written, one-time image erased -> multiboot back
//     -> authenticated
//   2 power cycle of board A: regular use, authenticated without multiboot
//   3 the used flash copied onto board B (other DNA): refused
//   4 board B's copy with the data segment erased: the controller image
//     jumps to the one-time image, which no longer configures: refused
// Mechanisms counted: blank-segment multiboot, check value written,
// self-erase, return multiboot, authentication granted, authentication
// refused, failed configuration of the erased image.
module fpga_auth_top_tb;
  import auth_pkg::*;
  import tb_ref_pkg::*;

  localparam logic [56:0] DNA_A = 57'h1D2_C3B4_A596_8778;
  localparam logic [56:0] DNA_B = 57'h1D2_C3B4_A596_8779;  // differs in one bit
  localparam logic [7:0]  MARK  = 8'hAA;                   // stands for a bitstream

  logic clk = 1'b0;
  always #10 clk = ~clk;  // 50 MHz

  logic cd_rst_n = 1'b1, otd_rst_n = 1'b1;
  initial #1 {cd_rst_n, otd_rst_n} = 2'b00;  // both images in reset before the first edge
  logic cd_cs_n, cd_sclk, cd_mosi, otd_cs_n, otd_sclk, otd_mosi, miso;
  logic cd_dclk, cd_dread, cd_dshift, cd_ddin, otd_dclk, otd_dread, otd_dshift, otd_ddin;
  logic cd_ce_n, cd_wr_n, otd_ce_n, otd_wr_n, ibusy;
  logic [7:0] cd_idin, otd_idin;
  logic cd_blank, cd_mb, enable, fail, written, erased, otd_mb;

  fpga_auth_top dut (
    .clk,
    .cd_rst_n, .cd_spi_cs_n(cd_cs_n), .cd_spi_sclk(cd_sclk), .cd_spi_mosi(cd_mosi), .cd_spi_miso(miso),
    .cd_dna_clk(cd_dclk), .cd_dna_read(cd_dread), .cd_dna_shift(cd_dshift), .cd_dna_din(cd_ddin),
    .cd_dna_dout(dout),
    .cd_icap_ce_n(cd_ce_n), .cd_icap_write_n(cd_wr_n), .cd_icap_din(cd_idin), .cd_icap_busy(ibusy),
    .cd_ds_blank(cd_blank), .cd_multiboot_sent(cd_mb), .design_enable(enable), .auth_fail(fail),
    .otd_rst_n, .otd_spi_cs_n(otd_cs_n), .otd_spi_sclk(otd_sclk), .otd_spi_mosi(otd_mosi), .otd_spi_miso(miso),
    .otd_dna_clk(otd_dclk), .otd_dna_read(otd_dread), .otd_dna_shift(otd_dshift), .otd_dna_din(otd_ddin),
    .otd_dna_dout(dout),
    .otd_icap_ce_n(otd_ce_n), .otd_icap_write_n(otd_wr_n), .otd_icap_din(otd_idin), .otd_icap_busy(ibusy),
    .otd_check_written(written), .otd_self_erased(erased), .otd_multiboot_sent(otd_mb));

  // ---- the board: whichever image is loaded owns the pins
  logic loaded_otd = 1'b0;   // 0: controller image loaded, 1: one-time image
  logic board_b = 1'b0;      // which device the flash sits on
  logic cs_n, sclk, mosi, dclk, dread, dshift, ddin, dout, dout_a, dout_b, ce_n, wr_n;
  logic [7:0] idin;
  assign cs_n   = loaded_otd ? otd_cs_n   : cd_cs_n;
  assign sclk   = loaded_otd ? otd_sclk   : cd_sclk;
  assign mosi   = loaded_otd ? otd_mosi   : cd_mosi;
  assign dclk   = loaded_otd ? otd_dclk   : cd_dclk;
  assign dread  = loaded_otd ? otd_dread  : cd_dread;
  assign dshift = loaded_otd ? otd_dshift : cd_dshift;
  assign ddin   = loaded_otd ? otd_ddin   : cd_ddin;
  assign ce_n   = loaded_otd ? otd_ce_n   : cd_ce_n;
  assign wr_n   = loaded_otd ? otd_wr_n   : cd_wr_n;
  assign idin   = loaded_otd ? otd_idin   : cd_idin;
  assign dout   = board_b ? dout_b : dout_a;

  at45db_model flash (.cs_n, .sclk, .mosi, .miso);
  dna_port_model #(.DNA_VALUE(DNA_A)) dna_a (.CLK(dclk && !board_b), .READ(dread), .SHIFT(dshift), .DIN(ddin), .DOUT(dout_a));
  dna_port_model #(.DNA_VALUE(DNA_B)) dna_b (.CLK(dclk && board_b), .READ(dread), .SHIFT(dshift), .DIN(ddin), .DOUT(dout_b));
  icap_model #(.BUSY_EVERY(7)) icap (.CLK(clk), .CE(ce_n), .WRITE(wr_n), .I(idin), .BUSY(ibusy));

  int checks = 0, failures = 0;
  int n_blank_mb = 0, n_written = 0, n_erased = 0, n_return_mb = 0, n_granted = 0, n_refused = 0,
      n_config_fail = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Configure the device with the image at addr (reset it, hold the other).
  // Returns 0 when the image's start page is erased.
  function automatic bit image_ok(input flash_addr_t a);
    return flash.rd(a) == MARK;
  endfunction

  task automatic configure(input bit otd);
    @(negedge clk);
    cd_rst_n = 1'b0; otd_rst_n = 1'b0;   // asynchronous reset of both
    loaded_otd = otd;
    repeat (2) @(negedge clk);
    if (otd) otd_rst_n = 1'b1; else cd_rst_n = 1'b1;
  endtask

  // Run the board from power-up until the controller image decides or a
  // configuration fails. Follows multiboot requests.
  task automatic power_up(output bit cfg_failed);
    int n_iprog, cycles;
    cfg_failed = 1'b0;
    configure(1'b0);
    n_iprog = icap.iprog_count;
    cycles = 0;
    while (!(enable || fail) && cycles < 400000) begin
      @(negedge clk); cycles++;
      if (icap.iprog_count != n_iprog) begin
        n_iprog = icap.iprog_count;
        repeat (10) @(negedge clk);  // let the sequence finish
        if (!loaded_otd && icap.iprog_addr == OTD_IMAGE_ADDR) n_blank_mb++;
        if (loaded_otd && icap.iprog_addr == CD_IMAGE_ADDR) begin
          n_return_mb++;
          if (written) n_written++;
          if (erased)  n_erased++;
        end
        if (!image_ok(icap.iprog_addr)) begin
          n_config_fail++;
          cfg_failed = 1'b1;
          return;                     // falls back to the controller image
        end
        configure(icap.iprog_addr == OTD_IMAGE_ADDR);
      end
    end
    check(cycles < 400000, "board did not settle");
    if (enable) n_granted++;
    if (fail)   n_refused++;
  endtask

  initial begin
    bit cf;
    check_t seg;
    flash.wr(CD_IMAGE_ADDR, MARK);
    flash.wr(OTD_IMAGE_ADDR, MARK);

    // 1: first power-up of board A
    power_up(cf);
    check(!cf, "configuration failed on first power-up");
    check(enable && !fail, "board A not authenticated after its first power-up");
    for (int i = 0; i < 8; i++) seg[63 - 8*i -: 8] = flash.rd(DATA_SEG_ADDR + 24'(i));
    check(seg == ref_check(DNA_A, DEFAULT_KEY), $sformatf("stored %h expected %h", seg, ref_check(DNA_A, DEFAULT_KEY)));
    check(!image_ok(OTD_IMAGE_ADDR), "one-time image still present");
    check(image_ok(CD_IMAGE_ADDR), "controller image damaged");
    check(icap.iprog_count == 2, $sformatf("%0d multiboots on first power-up, expected 2", icap.iprog_count));

    // 2: regular use of board A
    power_up(cf);
    check(enable && !fail, "board A refused on regular use");
    check(icap.iprog_count == 2, "multiboot on regular use");
    check(!cd_blank, "segment seen blank on regular use");

    // 3: the used flash on board B
    board_b = 1'b1;
    power_up(cf);
    check(fail && !enable, "copied flash accepted on board B");

    // 4: copy with the data segment erased: the one-time image is gone
    flash.erase_page(DATA_SEG_ADDR);
    power_up(cf);
    check(cf && !enable, "erased one-time image ran again");
    for (int i = 0; i < 8; i++) seg[63 - 8*i -: 8] = flash.rd(DATA_SEG_ADDR + 24'(i));
    check(seg == '1, "a check value was created for board B");

    // every mechanism must have happened
    check(n_blank_mb == 2, $sformatf("blank-segment multiboots: %0d", n_blank_mb));
    check(n_written == 1, $sformatf("check values written: %0d", n_written));
    check(n_erased == 1, $sformatf("self-erases: %0d", n_erased));
    check(n_return_mb == 1, $sformatf("return multiboots: %0d", n_return_mb));
    check(n_granted == 2, $sformatf("authentications granted: %0d", n_granted));
    check(n_refused == 1, $sformatf("authentications refused: %0d", n_refused));
    check(n_config_fail == 1, $sformatf("failed configurations: %0d", n_config_fail));
    check(icap.busy_stalls > 0, "ICAP BUSY never held a byte");
    $display("mechanisms: blank_multiboot=%0d written=%0d self_erase=%0d return_multiboot=%0d granted=%0d refused=%0d config_fail=%0d icap_stalls=%0d",
             n_blank_mb, n_written, n_erased, n_return_mb, n_granted, n_refused, n_config_fail, icap.busy_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
