// dna_port_model: behavioural model of the FPGA's Device DNA port (not
// synthesizable logic of this design; it stands for the vendor primitive).
// A 57-bit shift register: a rising CLK with READ high loads the factory
// identifier, a rising CLK with SHIFT high shifts it one place towards the
// MSB taking DIN at the LSB. DOUT is always the MSB.
module dna_port_model #(
  parameter logic [56:0] DNA_VALUE = 57'h0
) (
  input  logic CLK,
  input  logic READ,
  input  logic SHIFT,
  input  logic DIN,
  output logic DOUT
);
  logic [56:0] sr = '0;
  always @(posedge CLK) begin
    if (READ)       sr <= DNA_VALUE;
    else if (SHIFT) sr <= {sr[55:0], DIN};
  end
  assign DOUT = sr[56];
endmodule
