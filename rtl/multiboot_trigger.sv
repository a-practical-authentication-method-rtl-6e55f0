// multiboot_trigger: makes the FPGA reconfigure itself from another address
// of the configuration flash, through the internal configuration access port
// (ICAP) of a Spartan-3A class device.
//
// On `trigger` it writes this 16-bit word sequence, each word as two bytes,
// high byte first, on the 8-bit ICAP input:
//   FFFF            dummy
//   AA99            sync word
//   3261, addr[15:0]                   write GENERAL1: start address, low part
//   3281, {READ_OP, addr[23:16]}       write GENERAL2: SPI read opcode, high part
//   30A1, 000E      write CMD: IPROG (reconfigure)
//   2000, 2000      no-ops
// A byte is taken on a clock where CE and WRITE (both active low) are low and
// BUSY is low; while BUSY is high the byte is held.
//
// Interface: pulse `trigger` with `target_addr`; `done` pulses after the last
// byte (in hardware the device is reconfiguring by then).
// Timing: 20 clocks when BUSY stays low.
// Triggering a multiboot through ICAP follows the scheme; the word sequence
// is the usual one for this device family and is not given by the scheme.
module multiboot_trigger
  import auth_pkg::*;
#(
  parameter logic [7:0] READ_OP = MB_SPI_READ_OP
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        trigger,
  input  flash_addr_t target_addr,
  output logic        busy,
  output logic        done,
  // ICAP pins
  output logic        icap_ce_n,
  output logic        icap_write_n,
  output logic [7:0]  icap_din,
  input  logic        icap_busy
);

  localparam int unsigned NBYTES = 20;

  flash_addr_t addr;
  logic [4:0]  idx;
  logic [15:0] word;

  always_comb begin
    unique case (idx[4:1])
      4'd0:    word = 16'hFFFF;
      4'd1:    word = 16'hAA99;
      4'd2:    word = 16'h3261;
      4'd3:    word = addr[15:0];
      4'd4:    word = 16'h3281;
      4'd5:    word = {READ_OP, addr[23:16]};
      4'd6:    word = 16'h30A1;
      4'd7:    word = 16'h000E;
      default: word = 16'h2000;
    endcase
  end

  assign icap_din     = idx[0] ? word[7:0] : word[15:8];
  assign icap_ce_n    = !busy;
  assign icap_write_n = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr <= '0;
      idx  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (trigger) begin
          addr <= target_addr;
          idx  <= '0;
          busy <= 1'b1;
        end
      end else if (!icap_busy) begin
        if (idx == 5'(NBYTES - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          idx <= idx + 1'b1;
        end
      end
    end
  end

endmodule
