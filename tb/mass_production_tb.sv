// mass_production_tb: the scheme's intended use, many boards programmed with
// one identical flash image. Each of NBOARDS boards with a random Device DNA
// boots a fresh copy of the image at default parameters and must create its
// own check value and authenticate. Then every used flash is tried on every
// board: only the board that created it may accept it. The board and
// configuration-logic harness is the one of fpga_auth_top_tb.
module mass_production_tb;
  import auth_pkg::*;
  import tb_ref_pkg::*;

  localparam int NBOARDS = 6;
  logic [56:0] dna_of [NBOARDS];
  int board = 0;
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
  logic cs_n, sclk, mosi, dclk, dread, dshift, ddin, dout, ce_n, wr_n;
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

  at45db_model flash (.cs_n, .sclk, .mosi, .miso);
  // DNA port of the board the flash currently sits on
  logic [56:0] dna_sr = '0;
  always @(posedge dclk) begin
    if (dread)       dna_sr <= dna_of[board];
    else if (dshift) dna_sr <= {dna_sr[55:0], ddin};
  end
  assign dout = dna_sr[56];
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

  typedef logic [7:0] image_t [int unsigned];
  image_t used_flash [NBOARDS];

  initial begin
    static bit cf;
    static int granted_own = 0, refused_foreign = 0;
    for (int i = 0; i < NBOARDS; i++) dna_of[i] = {25'($urandom), $urandom};
    // every board gets the same fresh image and authenticates on its own
    for (int i = 0; i < NBOARDS; i++) begin
      check_t seg;
      flash.mem.delete();
      flash.wr(CD_IMAGE_ADDR, MARK);
      flash.wr(OTD_IMAGE_ADDR, MARK);
      board = i;
      power_up(cf);
      check(enable && !fail, $sformatf("board %0d not authenticated on first power-up", i));
      for (int k = 0; k < 8; k++) seg[63 - 8*k -: 8] = flash.rd(DATA_SEG_ADDR + 24'(k));
      check(seg == ref_check(dna_of[i], DEFAULT_KEY), $sformatf("board %0d check value", i));
      check(!image_ok(OTD_IMAGE_ADDR), $sformatf("board %0d one-time image left", i));
      used_flash[i] = flash.mem;
    end
    // every used flash on every board: only its own board accepts it
    for (int f = 0; f < NBOARDS; f++)
      for (int i = 0; i < NBOARDS; i++) begin
        flash.mem = used_flash[f];
        board = i;
        power_up(cf);
        check(!cf, "configuration failed");
        if (f == i) begin
          check(enable && !fail, $sformatf("flash %0d refused on its own board", f));
          if (enable) granted_own++;
        end else begin
          check(fail && !enable, $sformatf("flash %0d accepted on board %0d", f, i));
          if (fail) refused_foreign++;
        end
      end
    check(granted_own == NBOARDS, "own-board authentications");
    check(refused_foreign == NBOARDS * (NBOARDS - 1), "foreign-board refusals");
    check(n_blank_mb == NBOARDS && n_return_mb == NBOARDS, "one first-boot round trip per board");
    $display("boards=%0d first_boot_round_trips=%0d granted=%0d refused=%0d",
             NBOARDS, n_return_mb, granted_own, refused_foreign);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
