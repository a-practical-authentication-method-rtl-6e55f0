// otd_memory_part: the memory part of the one-time image, a writer followed
// by an eraser.
//
// Writer: programs the 64-bit check value into the data segment at DS_ADDR.
// When the flash reports the program finished, the value is the stored
// check value and the writer hands over to the eraser.
// Eraser: erases the flash page at OTD_ADDR, the first page of the one-time
// image itself. Without its start page that image can no longer configure
// the device, so the check value can never be generated again (for this
// board or for another one fed a copy of the flash).
//
// Interface: pulse `start` with `value`; `written` and `erased` rise as the
// two steps finish and stay high; `done` pulses at the end. The flash request
// port follows at45_flash_ctrl.
// Timing: two flash commands, each ending when the flash is ready again.
// The write-then-erase order and erasing only the start page follow the
// scheme; addresses are this implementation's memory map.
module otd_memory_part
  import auth_pkg::*;
#(
  parameter flash_addr_t DS_ADDR  = DATA_SEG_ADDR,
  parameter flash_addr_t OTD_ADDR = OTD_IMAGE_ADDR
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  check_t      value,
  output logic        busy,
  output logic        done,
  output logic        written,
  output logic        erased,
  // flash request port
  output logic        fl_valid,
  input  logic        fl_ready,
  output flash_cmd_e  fl_cmd,
  output flash_addr_t fl_addr,
  output check_t      fl_wdata,
  input  logic        fl_done,
  input  check_t      fl_rdata
);

  typedef enum logic [2:0] {S_IDLE, S_WR_REQ, S_WR_WAIT, S_ER_REQ, S_ER_WAIT} state_e;
  state_e state;
  check_t val_q;

  assign busy     = (state != S_IDLE);
  assign fl_valid = (state == S_WR_REQ) || (state == S_ER_REQ);
  assign fl_cmd   = (state == S_ER_REQ) ? FL_ERASE : FL_PROG8;
  assign fl_addr  = (state == S_ER_REQ) ? OTD_ADDR : DS_ADDR;
  assign fl_wdata = val_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      val_q   <= '0;
      done    <= 1'b0;
      written <= 1'b0;
      erased  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          val_q <= value;
          state <= S_WR_REQ;
        end
        S_WR_REQ:  if (fl_ready) state <= S_WR_WAIT;
        S_WR_WAIT: if (fl_done) begin
          written <= 1'b1;
          state   <= S_ER_REQ;         // writer activates the eraser
        end
        S_ER_REQ:  if (fl_ready) state <= S_ER_WAIT;
        S_ER_WAIT: if (fl_done) begin
          erased <= 1'b1;
          done   <= 1'b1;
          state  <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // fl_rdata is not needed: this part only writes and erases.
  logic unused_rdata;
  assign unused_rdata = ^fl_rdata;

endmodule
