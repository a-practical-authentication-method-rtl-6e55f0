// one_time_design: Design 2, the image that runs once per board to create
// the stored check value, then destroys itself.
//
// After reset its DNA part (dna_encryptor) reads the Device DNA, pads it to
// 64 bits and encrypts it with TEA under the product key. The memory part
// (otd_memory_part) writes the result into the data segment and then erases
// the first page of this image in the flash. Finally the multiboot trigger
// reconfigures the FPGA from RETURN_ADDR, the controller image, which now
// finds the check value and authenticates the device.
//
// Interface: SPI pins to the configuration flash, DNA port pins, ICAP pins,
// and status: `check_written` and `self_erased` as the memory part finishes
// its two steps, `multiboot_sent` once the ICAP sequence is out.
// Timing: the DNA read and TEA (about 58 us at 50 MHz), then the flash page
// program and page erase, each lasting as long as the flash stays busy.
// The order of the steps follows the scheme; jumping back to the controller
// image by multiboot (rather than waiting for a power cycle) is one of the
// two endings the scheme allows and the one chosen here.
module one_time_design
  import auth_pkg::*;
#(
  parameter logic [127:0] KEY          = DEFAULT_KEY,
  parameter flash_addr_t  DS_ADDR      = DATA_SEG_ADDR,
  parameter flash_addr_t  OTD_ADDR     = OTD_IMAGE_ADDR,
  parameter flash_addr_t  RETURN_ADDR  = CD_IMAGE_ADDR,
  parameter int unsigned  SPI_CLK_HALF = 2,
  parameter int unsigned  DNA_CLK_HALF = 25,
  parameter int unsigned  ROUNDS       = TEA_ROUNDS
) (
  input  logic       clk,
  input  logic       rst_n,
  // configuration flash
  output logic       spi_cs_n,
  output logic       spi_sclk,
  output logic       spi_mosi,
  input  logic       spi_miso,
  // DNA port
  output logic       dna_clk,
  output logic       dna_read,
  output logic       dna_shift,
  output logic       dna_din,
  input  logic       dna_dout,
  // ICAP
  output logic       icap_ce_n,
  output logic       icap_write_n,
  output logic [7:0] icap_din,
  input  logic       icap_busy,
  // status
  output logic       check_written,
  output logic       self_erased,
  output logic       multiboot_sent
);

  typedef enum logic [2:0] {S_START, S_ENCRYPT, S_STORE, S_MULTIBOOT, S_REBOOT} state_e;
  state_e state;

  logic        fl_valid, fl_ready, fl_done;
  flash_cmd_e  fl_cmd;
  flash_addr_t fl_addr;
  check_t      fl_wdata, fl_rdata;

  logic   enc_busy, enc_done;
  check_t dna_padded, check_value;
  logic   mem_busy, mem_done;
  logic   mb_busy, mb_done;

  at45_flash_ctrl #(.SPI_CLK_HALF(SPI_CLK_HALF)) u_flash (
    .clk, .rst_n, .req_valid(fl_valid), .req_ready(fl_ready), .req_cmd(fl_cmd),
    .req_addr(fl_addr), .req_wdata(fl_wdata), .done(fl_done), .rdata(fl_rdata),
    .spi_cs_n, .spi_sclk, .spi_mosi, .spi_miso);

  dna_encryptor #(.KEY(KEY), .DNA_CLK_HALF(DNA_CLK_HALF), .ROUNDS(ROUNDS)) u_dna (
    .clk, .rst_n, .start(state == S_START), .busy(enc_busy), .done(enc_done), .dna(dna_padded),
    .value(check_value), .dna_clk, .dna_read, .dna_shift, .dna_din, .dna_dout);

  otd_memory_part #(.DS_ADDR(DS_ADDR), .OTD_ADDR(OTD_ADDR)) u_mem (
    .clk, .rst_n, .start(enc_done), .value(check_value), .busy(mem_busy), .done(mem_done),
    .written(check_written), .erased(self_erased),
    .fl_valid, .fl_ready, .fl_cmd, .fl_addr, .fl_wdata, .fl_done, .fl_rdata);

  multiboot_trigger u_mb (
    .clk, .rst_n, .trigger(state == S_MULTIBOOT), .target_addr(RETURN_ADDR), .busy(mb_busy),
    .done(mb_done), .icap_ce_n, .icap_write_n, .icap_din, .icap_busy);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= S_START;
      multiboot_sent <= 1'b0;
    end else begin
      unique case (state)
        S_START:     state <= S_ENCRYPT;
        S_ENCRYPT:   if (enc_done) state <= S_STORE;
        S_STORE:     if (mem_done) state <= S_MULTIBOOT;
        S_MULTIBOOT: state <= S_REBOOT;
        S_REBOOT:    if (mb_done) multiboot_sent <= 1'b1;
        default:     state <= S_START;
      endcase
    end
  end

  // The image only reboots after erasing its own start page.
  a_erase_before_reboot: assert property (@(posedge clk) disable iff (!rst_n)
      (state == S_MULTIBOOT) |-> self_erased);

  logic unused;
  assign unused = enc_busy ^ mem_busy ^ mb_busy ^ (^dna_padded);

endmodule
