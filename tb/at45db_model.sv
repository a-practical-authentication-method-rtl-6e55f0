// at45db_model: behavioural model of an AT45DB161D SPI DataFlash in binary
// (512-byte page) mode, enough for the commands the authentication images
// use. Not part of the design; it stands for the memory chip on the board.
//   0x03 continuous array read: opcode, 3 address bytes, then data
//   0x82 page program through buffer 1: opcode, 3 address bytes, data bytes
//        into the buffer; raising CS programs the whole page from the buffer
//   0x81 page erase: opcode, 3 address bytes; raising CS erases the page
//   0xD7 status read: bit 7 is 1 when ready, repeated while CS stays low
// Program and erase keep the chip busy for BUSY_DELAY time units (the
// testbenches use a 20-unit clock period; a real part needs milliseconds). Unwritten
// bytes read as 0xFF. Counters report how often each command was seen.
module at45db_model #(
  parameter int unsigned BUSY_DELAY = 2000
) (
  input  logic cs_n,
  input  logic sclk,
  input  logic mosi,
  output logic miso
);
  logic [7:0] mem [int unsigned];
  logic [7:0] buf1 [512];
  logic       busy = 1'b0;
  logic [7:0] in_sr = '0, out_sr = '0, next_out = '0, opcode = '0;
  int unsigned bitcnt = 0, bytecnt = 0;
  logic [23:0] addr = '0;
  int n_read = 0, n_prog = 0, n_erase = 0, n_status = 0, n_busy_reject = 0;

  initial foreach (buf1[i]) buf1[i] = 8'hFF;

  function automatic logic [7:0] rd(input logic [23:0] a);
    return mem.exists(32'(a[20:0])) ? mem[32'(a[20:0])] : 8'hFF;
  endfunction

  task automatic wr(input logic [23:0] a, input logic [7:0] d);
    mem[32'(a[20:0])] = d;
  endtask

  task automatic erase_page(input logic [23:0] a);
    for (int i = 0; i < 512; i++) mem.delete(32'({a[20:9], 9'd0}) + i);
  endtask

  task automatic start_busy();
    busy = 1'b1;
    fork begin #(BUSY_DELAY); busy = 1'b0; end join_none
  endtask

  always @(negedge cs_n) begin
    bitcnt = 0; bytecnt = 0; next_out = 8'h00; out_sr = 8'h00;
  end

  always @(posedge sclk) if (!cs_n) begin
    in_sr = {in_sr[6:0], mosi};
    bitcnt++;
    if (bitcnt == 8) begin
      bitcnt = 0;
      if (bytecnt == 0) opcode = in_sr;
      else if (bytecnt <= 3) addr = {addr[15:0], in_sr};
      else if (opcode == 8'h82) buf1[(32'(addr[8:0]) + bytecnt - 4) % 512] = in_sr;
      // byte to shift out next
      if (opcode == 8'hD7) next_out = {~busy, 7'b0101100};
      else if (opcode == 8'h03 && bytecnt >= 3) next_out = rd(addr + 24'(bytecnt - 3));
      else next_out = 8'h00;
      bytecnt++;
    end
  end

  always @(negedge sclk) if (!cs_n) begin
    if (bitcnt == 0) out_sr = next_out;
    else out_sr = {out_sr[6:0], 1'b0};
  end
  assign miso = out_sr[7];

  always @(posedge cs_n) begin
    if (bytecnt >= 1) begin
      case (opcode)
        8'h03: n_read++;
        8'hD7: n_status++;
        8'h82: if (bytecnt >= 4) begin
          if (busy) n_busy_reject++;
          else begin
            for (int i = 0; i < 512; i++) wr({addr[23:9], 9'd0} + 24'(i), buf1[i]);
            n_prog++;
            start_busy();
          end
        end
        8'h81: if (bytecnt >= 4) begin
          if (busy) n_busy_reject++;
          else begin
            erase_page(addr);
            n_erase++;
            start_busy();
          end
        end
        default: ;
      endcase
    end
  end
endmodule
