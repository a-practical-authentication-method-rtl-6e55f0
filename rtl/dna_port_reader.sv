// dna_port_reader: reads the 57-bit Device DNA out of the FPGA's DNA port and
// pads it with zeros to a 64-bit block.
//
// The DNA port is a dedicated shift register. This reader drives its clock
// from the system clock, each half period lasting CLK_HALF system clocks
// (default 25, i.e. 1 MHz from 50 MHz, below the port's usual 2 MHz limit).
// It first gives one DNA clock with READ high, which loads the identifier so
// that DOUT shows bit 56. It then samples DOUT, gives one DNA clock with SHIFT
// high, and repeats until all 57 bits are in, MSB first. DIN is held low.
//
// Interface: pulse `start` while `busy` is low; `done` pulses when `dna`
// holds {7'b0, DNA[56:0]} (zero padding in the upper bits).
// Timing: (1 + 2*57) * CLK_HALF + 1 clocks from start to done.
// Reading the 57-bit DNA and padding it with zeros to 64 bits follow the
// scheme; where the zeros go and the port's clocking are choices made here.
module dna_port_reader
  import auth_pkg::*;
#(
  parameter int unsigned CLK_HALF = 25
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  output logic        busy,
  output logic        done,
  output check_t      dna,
  // DNA port pins
  output logic        dna_clk,
  output logic        dna_read,
  output logic        dna_shift,
  output logic        dna_din,
  input  logic        dna_dout
);

  typedef enum logic [2:0] {S_IDLE, S_LOAD_LO, S_LOAD_HI, S_SAMPLE, S_SHIFT_HI, S_DONE} state_e;
  state_e state;

  logic [$clog2(CLK_HALF+1)-1:0] timer;
  logic [5:0] nbits;
  logic [DNA_BITS-1:0] sr;
  logic tick;

  assign tick    = (timer == ($bits(timer))'(CLK_HALF - 1));
  assign dna_din = 1'b0;
  assign busy    = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      timer     <= '0;
      nbits     <= '0;
      sr        <= '0;
      dna_clk   <= 1'b0;
      dna_read  <= 1'b0;
      dna_shift <= 1'b0;
      done      <= 1'b0;
      dna       <= '0;
    end else begin
      done  <= 1'b0;
      timer <= (state == S_IDLE || tick) ? '0 : timer + 1'b1;
      unique case (state)
        S_IDLE: if (start) begin
          state    <= S_LOAD_LO;
          dna_read <= 1'b1;
          nbits    <= '0;
        end
        S_LOAD_LO: if (tick) begin
          state   <= S_LOAD_HI;
          dna_clk <= 1'b1;               // rising edge loads the DNA
        end
        S_LOAD_HI: if (tick) begin
          state    <= S_SAMPLE;
          dna_clk  <= 1'b0;
          dna_read <= 1'b0;
        end
        S_SAMPLE: if (tick) begin
          sr    <= {sr[DNA_BITS-2:0], dna_dout};
          nbits <= nbits + 1'b1;
          if (nbits == 6'(DNA_BITS - 1)) begin
            state <= S_DONE;
          end else begin
            state     <= S_SHIFT_HI;
            dna_shift <= 1'b1;
            dna_clk   <= 1'b1;           // rising edge shifts the next bit out
          end
        end
        S_SHIFT_HI: if (tick) begin
          state     <= S_SAMPLE;
          dna_clk   <= 1'b0;
          dna_shift <= 1'b0;
        end
        S_DONE: begin
          state <= S_IDLE;
          done  <= 1'b1;
          dna   <= {{(CHECK_BITS-DNA_BITS){1'b0}}, sr};
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
