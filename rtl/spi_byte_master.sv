// spi_byte_master: SPI mode-0 shifter that moves one byte each way.
//
// SCLK idles low. The byte goes out MSB first on MOSI, which changes after a
// falling edge; MISO is sampled on each rising edge. Each SCLK half period is
// CLK_HALF system clocks (default 2: 12.5 MHz from a 50 MHz clock, inside
// the 33 MHz limit of the low-frequency read command). Chip select is left to
// the caller, which may chain bytes into one command.
//
// Interface: pulse `start` with `tx_byte` while `busy` is low; `done` pulses
// with `rx_byte` valid. Timing: `done` is high 16 * CLK_HALF clocks after
// the clock that took `start`.
module spi_byte_master #(
  parameter int unsigned CLK_HALF = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] tx_byte,
  output logic       busy,
  output logic       done,
  output logic [7:0] rx_byte,
  output logic       sclk,
  output logic       mosi,
  input  logic       miso
);

  logic [$clog2(CLK_HALF+1)-1:0] timer;
  logic [7:0] tx_sr;
  logic [2:0] bit_idx;
  logic tick;

  assign tick = (timer == ($bits(timer))'(CLK_HALF - 1));
  assign mosi = tx_sr[7];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      timer   <= '0;
      tx_sr   <= '0;
      rx_byte <= '0;
      bit_idx <= '0;
      sclk    <= 1'b0;
      busy    <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        timer <= '0;
        if (start) begin
          tx_sr   <= tx_byte;
          bit_idx <= '0;
          busy    <= 1'b1;
        end
      end else begin
        timer <= tick ? '0 : timer + 1'b1;
        if (tick) begin
          if (!sclk) begin
            sclk    <= 1'b1;
            rx_byte <= {rx_byte[6:0], miso};
          end else begin
            sclk <= 1'b0;
            if (bit_idx == 3'd7) begin
              busy <= 1'b0;
              done <= 1'b1;
            end else begin
              bit_idx <= bit_idx + 1'b1;
              tx_sr   <= {tx_sr[6:0], 1'b0};
            end
          end
        end
      end
    end
  end

endmodule
