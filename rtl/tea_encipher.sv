// tea_encipher: iterative TEA (Tiny Encryption Algorithm) encryption core.
//
// Encrypts one 64-bit block under a 128-bit key with ROUNDS Feistel cycles
// (32 by default, the TEA configuration the scheme uses). Each clock runs one
// full cycle of TEA, that is both half-rounds:
//   sum += DELTA
//   v0  += ((v1 << 4) + k0) ^ (v1 + sum) ^ ((v1 >> 5) + k1)
//   v1  += ((v0 << 4) + k2) ^ (v0 + sum) ^ ((v0 >> 5) + k3)
// The block is split as v0 = block[63:32], v1 = block[31:0]; the key as
// k0 = key[127:96] ... k3 = key[31:0].
//
// Interface: pulse `start` with `plaintext` and `key` valid while `busy` is
// low. `done` pulses for one clock when `ciphertext` is ready; `ciphertext`
// then holds its value until the next start.
// Timing: done is high ROUNDS clocks after the start clock (32 clocks).
// One cycle per clock is this implementation's choice; the scheme only names
// TEA and its sizes.
module tea_encipher
  import auth_pkg::*;
#(
  parameter int unsigned ROUNDS = TEA_ROUNDS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [63:0]  plaintext,
  input  logic [127:0] key,
  output logic         busy,
  output logic         done,
  output logic [63:0]  ciphertext
);

  logic [31:0] v0, v1, sum;
  logic [31:0] k0, k1, k2, k3;
  logic [$clog2(ROUNDS+1)-1:0] cnt;

  // Key is held in a register so it may change after start.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {k0, k1, k2, k3} <= '0;
    else if (start && !busy) {k0, k1, k2, k3} <= key;
  end

  logic [31:0] sum_n, v0_n, v1_n;
  always_comb begin
    sum_n = sum + TEA_DELTA;
    v0_n  = v0 + ((((v1 << 4) + k0) ^ (v1 + sum_n)) ^ ((v1 >> 5) + k1));
    v1_n  = v1 + ((((v0_n << 4) + k2) ^ (v0_n + sum_n)) ^ ((v0_n >> 5) + k3));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v0   <= '0;
      v1   <= '0;
      sum  <= '0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          v0   <= plaintext[63:32];
          v1   <= plaintext[31:0];
          sum  <= '0;
          cnt  <= '0;
          busy <= 1'b1;
        end
      end else begin
        v0  <= v0_n;
        v1  <= v1_n;
        sum <= sum_n;
        cnt <= cnt + 1'b1;
        if (cnt == ($bits(cnt))'(ROUNDS - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign ciphertext = {v0, v1};

endmodule
