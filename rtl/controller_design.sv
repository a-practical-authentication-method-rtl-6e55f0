// controller_design: Design 1, the image the FPGA always boots from at the
// bottom of the flash. It contains the protected design's enable.
//
// After reset it starts two jobs at once: the data segment controller reads
// the data segment, and the active value obtainer (dna_encryptor) reads the
// Device DNA and encrypts it.
//  - Data segment blank: this is the first power-up after the flash was
//    programmed. The multiboot trigger reconfigures the FPGA from OTD_ADDR,
//    the one-time image, which will create the stored check value.
//  - Data segment holds a value: the comparison part checks it against the
//    active value. Equal: `design_enable` goes high and stays high, which
//    lets the protected design work. Different (copied flash, other device):
//    `auth_fail` goes high and the enable stays low.
//
// Interface: SPI pins to the configuration flash, DNA port pins, ICAP pins,
// and the status outputs below. `multiboot_sent` rises once the ICAP
// sequence has been written; the device then reconfigures.
// Timing: at the defaults (50 MHz) about 58 us for the DNA read, 0.7 us for
// TEA and 8 us for the flash read, which run in parallel.
// What the protected design does without the enable (off, limited, active
// defence) is left to that design.
module controller_design
  import auth_pkg::*;
#(
  parameter logic [127:0] KEY          = DEFAULT_KEY,
  parameter flash_addr_t  DS_ADDR      = DATA_SEG_ADDR,
  parameter flash_addr_t  OTD_ADDR     = OTD_IMAGE_ADDR,
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
  output logic       ds_blank,
  output logic       multiboot_sent,
  output logic       design_enable,
  output logic       auth_fail
);

  typedef enum logic [2:0] {S_START, S_CHECK, S_MULTIBOOT, S_REBOOT, S_COMPARE, S_DECIDED} state_e;
  state_e state;

  // flash request port, driven by the data segment controller only
  logic        fl_valid, fl_ready, fl_done;
  flash_cmd_e  fl_cmd;
  flash_addr_t fl_addr;
  check_t      fl_wdata, fl_rdata;

  logic   ds_start, ds_busy, ds_done, ds_is_blank;
  check_t stored_value;
  logic   enc_start, enc_busy, enc_done;
  check_t dna_padded, active_value;
  logic   mb_trigger, mb_busy, mb_done;
  logic   decided, authenticated;

  at45_flash_ctrl #(.SPI_CLK_HALF(SPI_CLK_HALF)) u_flash (
    .clk, .rst_n, .req_valid(fl_valid), .req_ready(fl_ready), .req_cmd(fl_cmd),
    .req_addr(fl_addr), .req_wdata(fl_wdata), .done(fl_done), .rdata(fl_rdata),
    .spi_cs_n, .spi_sclk, .spi_mosi, .spi_miso);

  data_segment_controller #(.DS_ADDR(DS_ADDR)) u_dsc (
    .clk, .rst_n, .start(ds_start), .busy(ds_busy), .done(ds_done), .blank(ds_is_blank),
    .stored_value, .fl_valid, .fl_ready, .fl_cmd, .fl_addr, .fl_wdata, .fl_done, .fl_rdata);

  dna_encryptor #(.KEY(KEY), .DNA_CLK_HALF(DNA_CLK_HALF), .ROUNDS(ROUNDS)) u_active (
    .clk, .rst_n, .start(enc_start), .busy(enc_busy), .done(enc_done), .dna(dna_padded),
    .value(active_value), .dna_clk, .dna_read, .dna_shift, .dna_din, .dna_dout);

  check_comparator u_cmp (
    .clk, .rst_n, .active_valid(enc_done), .active_value,
    .stored_valid(ds_done && !ds_is_blank), .stored_value, .decided, .authenticated);

  multiboot_trigger u_mb (
    .clk, .rst_n, .trigger(mb_trigger), .target_addr(OTD_ADDR), .busy(mb_busy), .done(mb_done),
    .icap_ce_n, .icap_write_n, .icap_din, .icap_busy);

  assign ds_start   = (state == S_START);
  assign enc_start  = (state == S_START);
  assign mb_trigger = (state == S_MULTIBOOT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= S_START;
      ds_blank       <= 1'b0;
      multiboot_sent <= 1'b0;
      design_enable  <= 1'b0;
      auth_fail      <= 1'b0;
    end else begin
      unique case (state)
        S_START: state <= S_CHECK;
        S_CHECK: if (ds_done) begin
          ds_blank <= ds_is_blank;
          state    <= ds_is_blank ? S_MULTIBOOT : S_COMPARE;
        end
        S_MULTIBOOT: state <= S_REBOOT;
        S_REBOOT: if (mb_done) multiboot_sent <= 1'b1;  // device reconfigures
        S_COMPARE: if (decided) begin
          design_enable <= authenticated;
          auth_fail     <= !authenticated;
          state         <= S_DECIDED;
        end
        S_DECIDED: ;
        default: state <= S_START;
      endcase
    end
  end

  // The enable is never given without a stored value equal to the active one.
  a_enable_needs_match: assert property (@(posedge clk) disable iff (!rst_n)
      $rose(design_enable) |-> ($past(active_value) == $past(stored_value) && !ds_blank));

  logic unused;
  assign unused = ds_busy ^ enc_busy ^ mb_busy ^ (^dna_padded);

endmodule
