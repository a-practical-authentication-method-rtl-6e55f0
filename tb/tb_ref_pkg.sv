// tb_ref_pkg: reference functions for the testbenches, written from the
// algorithm's definition independently of the RTL.
package tb_ref_pkg;
  // TEA encryption, 32 cycles, v0 = block[63:32], k0 = key[127:96].
  function automatic logic [63:0] ref_tea(input logic [63:0] p, input logic [127:0] k);
    logic [31:0] y, z, s;
    y = p[63:32]; z = p[31:0]; s = 0;
    for (int i = 0; i < 32; i++) begin
      s += 32'h9E3779B9;
      y += ((z << 4) + k[127:96]) ^ (z + s) ^ ((z >> 5) + k[95:64]);
      z += ((y << 4) + k[63:32]) ^ (y + s) ^ ((y >> 5) + k[31:0]);
    end
    return {y, z};
  endfunction

  // Check value of a device: its 57-bit DNA, zero-padded, encrypted.
  function automatic logic [63:0] ref_check(input logic [56:0] dna, input logic [127:0] k);
    return ref_tea({7'b0, dna}, k);
  endfunction
endpackage
