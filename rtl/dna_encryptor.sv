// dna_encryptor: forms the 64-bit value that ties a configuration to one
// device: the Device DNA, padded with zeros to 64 bits, encrypted with TEA
// under the product key.
//
// The same unit serves both images: in the one-time image its result becomes
// the stored check value, in the controller image it is the "active value"
// compared with the stored one. It runs dna_port_reader and then
// tea_encipher.
//
// Interface: pulse `start` while `busy` is low; `done` pulses when `value`
// (the ciphertext) and `dna` (the padded identifier) are valid.
// Timing: the DNA read ((1+2*57)*DNA_CLK_HALF+1 clocks), one clock to start
// the cipher, then TEA_ROUNDS clocks.
module dna_encryptor
  import auth_pkg::*;
#(
  parameter logic [127:0] KEY          = DEFAULT_KEY,
  parameter int unsigned  DNA_CLK_HALF = 25,
  parameter int unsigned  ROUNDS       = TEA_ROUNDS
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  output logic   busy,
  output logic   done,
  output check_t dna,
  output check_t value,
  // DNA port pins
  output logic   dna_clk,
  output logic   dna_read,
  output logic   dna_shift,
  output logic   dna_din,
  input  logic   dna_dout
);

  logic rd_busy, rd_done, tea_busy;

  dna_port_reader #(.CLK_HALF(DNA_CLK_HALF)) u_reader (
    .clk, .rst_n, .start(start && !busy), .busy(rd_busy), .done(rd_done), .dna,
    .dna_clk, .dna_read, .dna_shift, .dna_din, .dna_dout);

  tea_encipher #(.ROUNDS(ROUNDS)) u_tea (
    .clk, .rst_n, .start(rd_done), .plaintext(dna), .key(KEY),
    .busy(tea_busy), .done, .ciphertext(value));

  assign busy = rd_busy || rd_done || tea_busy;

endmodule
