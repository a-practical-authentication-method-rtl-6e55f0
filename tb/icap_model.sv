// icap_model: behavioural model of the 8-bit internal configuration access
// port and of the part of the configuration logic that reacts to a multiboot
// command. Not part of the design. It takes a byte on a rising CLK with CE,
// WRITE and BUSY low, pairs bytes into 16-bit words (high byte first), waits
// for the sync word AA99, then records writes to GENERAL1, GENERAL2 and CMD.
// An IPROG command (CMD = 000E) counts as a reconfiguration request with the
// address and read opcode held in GENERAL1/GENERAL2. When BUSY_EVERY is not
// zero, BUSY is raised for one clock after every BUSY_EVERY accepted bytes.
module icap_model #(
  parameter int unsigned BUSY_EVERY = 0
) (
  input  logic       CLK,
  input  logic       CE,
  input  logic       WRITE,
  input  logic [7:0] I,
  output logic       BUSY
);
  logic [7:0]  hi = '0;
  logic        have_hi = 1'b0, synced = 1'b0;
  logic [15:0] target = '0;     // register the next word goes to
  logic [15:0] gen1 = '0, gen2 = '0;
  int          nbytes = 0, iprog_count = 0, busy_stalls = 0;
  logic [23:0] iprog_addr = '0;
  logic [7:0]  iprog_op = '0;
  logic        busy_q = 1'b0;
  event        iprog_ev;

  assign BUSY = busy_q;

  always @(posedge CLK) begin
    if (!CE && !WRITE && busy_q) busy_stalls++;
    if (!CE && !WRITE && !busy_q) begin
      nbytes++;
      if (!have_hi) begin
        hi = I; have_hi = 1'b1;
      end else begin
        logic [15:0] w;
        w = {hi, I}; have_hi = 1'b0;
        if (!synced) begin
          if (w == 16'hAA99) synced = 1'b1;
        end else if (target != 0) begin
          case (target)
            16'h3261: gen1 = w;
            16'h3281: gen2 = w;
            16'h30A1: if (w == 16'h000E) begin
              iprog_count++;
              iprog_addr = {gen2[7:0], gen1};
              iprog_op   = gen2[15:8];
              synced     = 1'b0;
              -> iprog_ev;
            end
            default: ;
          endcase
          target = 0;
        end else if (w == 16'h3261 || w == 16'h3281 || w == 16'h30A1) begin
          target = w;
        end
      end
      busy_q <= (BUSY_EVERY != 0) && (nbytes % BUSY_EVERY == 0);
    end else begin
      busy_q <= 1'b0;
    end
  end
endmodule
