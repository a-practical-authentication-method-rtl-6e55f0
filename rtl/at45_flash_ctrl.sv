// at45_flash_ctrl: command engine for the AT45DB161D DataFlash that holds the
// configuration images and the data segment.
//
// It runs one of three commands on the SPI bus, built from byte transfers of
// spi_byte_master:
//   FL_READ8  opcode 0x03 + 24-bit address, then 8 bytes read into rdata
//   FL_PROG8  opcode 0x82 + 24-bit address + the 8 bytes of wdata
//             (page program through buffer 1)
//   FL_ERASE  opcode 0x81 + 24-bit address (page erase)
// After a program or an erase it raises CS, opens a new command 0xD7 and
// reads the status byte until bit 7 (ready) is set, so `done` means the
// flash has finished. Data is big-endian: byte 0 is bits 63:56. Between two
// commands CS stays high for CS_GAP clocks.
//
// Interface: `req_valid`/`req_ready` handshake with cmd, addr and wdata;
// `done` pulses once per accepted command, with `rdata` valid after a read.
// Timing: 12 bytes for a read or program, 4 for an erase, each byte
// 16*SPI_CLK_HALF+2 clocks, plus CS_GAP clocks and the busy polling.
// The scheme only says that the images read, write and erase the memory;
// the command set and this engine are implementation choices.
module at45_flash_ctrl
  import auth_pkg::*;
#(
  parameter int unsigned SPI_CLK_HALF = 2,
  parameter int unsigned CS_GAP       = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // command port
  input  logic        req_valid,
  output logic        req_ready,
  input  flash_cmd_e  req_cmd,
  input  flash_addr_t req_addr,
  input  check_t      req_wdata,
  output logic        done,
  output check_t      rdata,
  // SPI pins
  output logic        spi_cs_n,
  output logic        spi_sclk,
  output logic        spi_mosi,
  input  logic        spi_miso
);

  typedef enum logic [2:0] {S_IDLE, S_SEND, S_WAIT, S_GAP, S_POLL_OP, S_POLL_WAIT, S_END_GAP} state_e;
  state_e      state;
  flash_cmd_e  cmd;
  flash_addr_t addr;
  check_t      wdata;
  logic [3:0]  idx;
  logic [3:0]  last_idx;
  logic [$clog2(CS_GAP+1)-1:0] gap;

  logic       b_start, b_busy, b_done;
  logic [7:0] b_tx, b_rx;

  spi_byte_master #(.CLK_HALF(SPI_CLK_HALF)) u_spi (
    .clk, .rst_n, .start(b_start), .tx_byte(b_tx), .busy(b_busy), .done(b_done),
    .rx_byte(b_rx), .sclk(spi_sclk), .mosi(spi_mosi), .miso(spi_miso));

  assign req_ready = (state == S_IDLE);
  assign last_idx  = (cmd == FL_ERASE) ? 4'd3 : 4'd11;

  // Byte to send in the main command.
  logic [7:0] opcode;
  always_comb begin
    unique case (cmd)
      FL_READ8: opcode = AT45_OP_READ;
      FL_PROG8: opcode = AT45_OP_PROG_BUF1;
      default:  opcode = AT45_OP_PAGE_ERASE;
    endcase
    unique case (idx)
      4'd0:    b_tx = opcode;
      4'd1:    b_tx = addr[23:16];
      4'd2:    b_tx = addr[15:8];
      4'd3:    b_tx = addr[7:0];
      default: b_tx = (cmd == FL_PROG8) ? wdata[63:56] : 8'h00;
    endcase
    if (state == S_POLL_OP)   b_tx = AT45_OP_STATUS;
    if (state == S_POLL_WAIT) b_tx = 8'h00;
  end

  logic polled;  // status read has been opened
  assign b_start = (state == S_SEND) || (state == S_POLL_OP) ||
                   (state == S_POLL_WAIT && !b_busy && !b_done && polled);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cmd      <= FL_READ8;
      addr     <= '0;
      wdata    <= '0;
      rdata    <= '0;
      idx      <= '0;
      gap      <= '0;
      polled   <= 1'b0;
      spi_cs_n <= 1'b1;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (req_valid) begin
          cmd      <= req_cmd;
          addr     <= req_addr;
          wdata    <= req_wdata;
          idx      <= '0;
          polled   <= 1'b0;
          spi_cs_n <= 1'b0;
          state    <= S_SEND;
        end
        S_SEND: state <= S_WAIT;           // byte transfer started
        S_WAIT: if (b_done) begin
          if (idx >= 4'd4) begin
            if (cmd == FL_READ8) rdata <= {rdata[55:0], b_rx};
            if (cmd == FL_PROG8) wdata <= {wdata[55:0], 8'h00};
          end
          if (idx == last_idx) begin
            spi_cs_n <= 1'b1;
            gap      <= '0;
            state    <= S_GAP;
          end else begin
            idx   <= idx + 1'b1;
            state <= S_SEND;
          end
        end
        S_GAP: begin                       // CS high after the main command
          gap <= gap + 1'b1;
          if (gap == ($bits(gap))'(CS_GAP - 1)) begin
            if (cmd == FL_READ8) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              spi_cs_n <= 1'b0;
              state    <= S_POLL_OP;
            end
          end
        end
        S_POLL_OP: begin                   // 0xD7 is being sent
          polled <= 1'b0;
          state  <= S_POLL_WAIT;
        end
        S_POLL_WAIT: if (b_done) begin
          if (polled && b_rx[7]) begin     // ready
            spi_cs_n <= 1'b1;
            gap      <= '0;
            state    <= S_END_GAP;
          end
          polled <= 1'b1;
        end
        S_END_GAP: begin
          gap <= gap + 1'b1;
          if (gap == ($bits(gap))'(CS_GAP - 1)) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
