// auth_pkg: constants and types shared by the two configuration images of the
// DNA-based FPGA authentication scheme.
//
// The scheme keeps two bitstreams and one small data area in the SPI flash
// that configures the FPGA. Design 1 (controller_design) checks a stored
// check value against the device's encrypted Device DNA; Design 2
// (one_time_design) creates that check value once and then erases its own
// start page. The flash is an AT45DB161D DataFlash (16 Mbit). The flash
// command codes, the address map and the ICAP multiboot words below are this
// implementation's choices (taken from the usual behaviour of these parts);
// the scheme only fixes the three-part memory layout with the data segment
// at the end of the memory.
package auth_pkg;

  // ---------------------------------------------------------------- flash --
  typedef logic [23:0] flash_addr_t;

  // Commands accepted by at45_flash_ctrl.
  typedef enum logic [1:0] {
    FL_READ8  = 2'd0,  // read the 8 bytes at addr
    FL_PROG8  = 2'd1,  // program 8 bytes at addr (page program through buffer 1)
    FL_ERASE  = 2'd2   // erase the page that holds addr
  } flash_cmd_e;

  // AT45DB161D opcodes.
  localparam logic [7:0] AT45_OP_READ       = 8'h03; // continuous array read (low frequency)
  localparam logic [7:0] AT45_OP_PROG_BUF1  = 8'h82; // main memory page program through buffer 1
  localparam logic [7:0] AT45_OP_PAGE_ERASE = 8'h81; // page erase
  localparam logic [7:0] AT45_OP_STATUS     = 8'hD7; // status register read, bit 7 = ready

  // Memory map (binary 512-byte page mode, 2 MiB). Part 1: Design 1 at the
  // bottom. Part 2: Design 2 after a blank gap. Part 3: the data segment in
  // the last page.
  localparam flash_addr_t CD_IMAGE_ADDR  = 24'h000000;
  localparam flash_addr_t OTD_IMAGE_ADDR = 24'h080000;
  localparam flash_addr_t DATA_SEG_ADDR  = 24'h1FFE00;

  // ------------------------------------------------------------ check value --
  localparam int unsigned DNA_BITS   = 57; // width of the Device DNA
  localparam int unsigned CHECK_BITS = 64; // padded DNA and TEA block width
  typedef logic [CHECK_BITS-1:0] check_t;

  // An erased flash reads all ones: a data segment holding this is blank.
  localparam check_t BLANK_VALUE = '1;

  // ------------------------------------------------------------------- TEA --
  localparam logic [31:0] TEA_DELTA   = 32'h9E37_79B9;
  localparam int unsigned TEA_ROUNDS  = 32;
  // Product key used by both images; each product line sets its own.
  localparam logic [127:0] DEFAULT_KEY = 128'h3A5C_96E1_0F2B_7D48_C1E6_5B09_A47F_8263;

  // ------------------------------------------------------------------ ICAP --
  // SPI read opcode the configuration logic uses after a multiboot.
  localparam logic [7:0] MB_SPI_READ_OP = 8'h03;

endpackage
