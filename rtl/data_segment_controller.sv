// data_segment_controller: reads the data segment, the third part of the
// configuration flash, and decides whether it holds a stored check value.
//
// On `start` it asks the flash engine for the 8 bytes at DS_ADDR. Erased
// flash reads all ones, so a segment of all ones is "blank": the one-time
// image has not run on this board yet. Any other content is taken as the
// stored check value.
//
// Interface: pulse `start`; `done` pulses with `blank` and `stored_value`
// valid (both hold until the next start). The flash request port follows
// at45_flash_ctrl (valid/ready, then a done pulse with rdata).
// Timing: one flash read, about 12 SPI bytes.
// Reading the segment and branching on "blank" follow the scheme; the
// all-ones test and the segment size of 8 bytes are choices made here.
module data_segment_controller
  import auth_pkg::*;
#(
  parameter flash_addr_t DS_ADDR = DATA_SEG_ADDR
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  output logic        busy,
  output logic        done,
  output logic        blank,
  output check_t      stored_value,
  // flash request port
  output logic        fl_valid,
  input  logic        fl_ready,
  output flash_cmd_e  fl_cmd,
  output flash_addr_t fl_addr,
  output check_t      fl_wdata,
  input  logic        fl_done,
  input  check_t      fl_rdata
);

  typedef enum logic [1:0] {S_IDLE, S_REQ, S_WAIT} state_e;
  state_e state;

  assign busy     = (state != S_IDLE);
  assign fl_valid = (state == S_REQ);
  assign fl_cmd   = FL_READ8;
  assign fl_addr  = DS_ADDR;
  assign fl_wdata = '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      done         <= 1'b0;
      blank        <= 1'b0;
      stored_value <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE:  if (start) state <= S_REQ;
        S_REQ:   if (fl_ready) state <= S_WAIT;
        S_WAIT:  if (fl_done) begin
          stored_value <= fl_rdata;
          blank        <= (fl_rdata == BLANK_VALUE);
          done         <= 1'b1;
          state        <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
