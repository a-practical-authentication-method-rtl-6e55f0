// fpga_auth_top: the two configuration images of the DNA authentication
// scheme side by side.
//
// In the device only one image is loaded at a time: the configuration logic
// loads controller_design (Design 1) from the bottom of the flash at power-up,
// and one_time_design (Design 2) only when Design 1 triggers a multiboot
// because the data segment is blank. Both images use the same flash, the
// same DNA port and the same ICAP, so each has its own set of those pins here
// (cd_* and otd_*), and its own reset: hold the image that is not loaded in
// reset. Both share the product key and the flash memory map, which this top
// passes to both, so that the value Design 2 stores is the one Design 1
// expects.
module fpga_auth_top
  import auth_pkg::*;
#(
  parameter logic [127:0] KEY          = DEFAULT_KEY,
  parameter flash_addr_t  CD_ADDR      = CD_IMAGE_ADDR,
  parameter flash_addr_t  OTD_ADDR     = OTD_IMAGE_ADDR,
  parameter flash_addr_t  DS_ADDR      = DATA_SEG_ADDR,
  parameter int unsigned  SPI_CLK_HALF = 2,
  parameter int unsigned  DNA_CLK_HALF = 25,
  parameter int unsigned  ROUNDS       = TEA_ROUNDS
) (
  input  logic       clk,
  // ---- Design 1: controller image
  input  logic       cd_rst_n,
  output logic       cd_spi_cs_n,
  output logic       cd_spi_sclk,
  output logic       cd_spi_mosi,
  input  logic       cd_spi_miso,
  output logic       cd_dna_clk,
  output logic       cd_dna_read,
  output logic       cd_dna_shift,
  output logic       cd_dna_din,
  input  logic       cd_dna_dout,
  output logic       cd_icap_ce_n,
  output logic       cd_icap_write_n,
  output logic [7:0] cd_icap_din,
  input  logic       cd_icap_busy,
  output logic       cd_ds_blank,
  output logic       cd_multiboot_sent,
  output logic       design_enable,
  output logic       auth_fail,
  // ---- Design 2: one-time image
  input  logic       otd_rst_n,
  output logic       otd_spi_cs_n,
  output logic       otd_spi_sclk,
  output logic       otd_spi_mosi,
  input  logic       otd_spi_miso,
  output logic       otd_dna_clk,
  output logic       otd_dna_read,
  output logic       otd_dna_shift,
  output logic       otd_dna_din,
  input  logic       otd_dna_dout,
  output logic       otd_icap_ce_n,
  output logic       otd_icap_write_n,
  output logic [7:0] otd_icap_din,
  input  logic       otd_icap_busy,
  output logic       otd_check_written,
  output logic       otd_self_erased,
  output logic       otd_multiboot_sent
);

  controller_design #(
    .KEY(KEY), .DS_ADDR(DS_ADDR), .OTD_ADDR(OTD_ADDR),
    .SPI_CLK_HALF(SPI_CLK_HALF), .DNA_CLK_HALF(DNA_CLK_HALF), .ROUNDS(ROUNDS)
  ) u_design1 (
    .clk, .rst_n(cd_rst_n),
    .spi_cs_n(cd_spi_cs_n), .spi_sclk(cd_spi_sclk), .spi_mosi(cd_spi_mosi), .spi_miso(cd_spi_miso),
    .dna_clk(cd_dna_clk), .dna_read(cd_dna_read), .dna_shift(cd_dna_shift), .dna_din(cd_dna_din),
    .dna_dout(cd_dna_dout),
    .icap_ce_n(cd_icap_ce_n), .icap_write_n(cd_icap_write_n), .icap_din(cd_icap_din),
    .icap_busy(cd_icap_busy),
    .ds_blank(cd_ds_blank), .multiboot_sent(cd_multiboot_sent), .design_enable, .auth_fail);

  one_time_design #(
    .KEY(KEY), .DS_ADDR(DS_ADDR), .OTD_ADDR(OTD_ADDR), .RETURN_ADDR(CD_ADDR),
    .SPI_CLK_HALF(SPI_CLK_HALF), .DNA_CLK_HALF(DNA_CLK_HALF), .ROUNDS(ROUNDS)
  ) u_design2 (
    .clk, .rst_n(otd_rst_n),
    .spi_cs_n(otd_spi_cs_n), .spi_sclk(otd_spi_sclk), .spi_mosi(otd_spi_mosi), .spi_miso(otd_spi_miso),
    .dna_clk(otd_dna_clk), .dna_read(otd_dna_read), .dna_shift(otd_dna_shift), .dna_din(otd_dna_din),
    .dna_dout(otd_dna_dout),
    .icap_ce_n(otd_icap_ce_n), .icap_write_n(otd_icap_write_n), .icap_din(otd_icap_din),
    .icap_busy(otd_icap_busy),
    .check_written(otd_check_written), .self_erased(otd_self_erased),
    .multiboot_sent(otd_multiboot_sent));

endmodule
