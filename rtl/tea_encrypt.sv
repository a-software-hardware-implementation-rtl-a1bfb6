// TEA block encryption, fully unrolled and combinational.
//
// The Tiny Encryption Algorithm enciphers a 64-bit block, held as two 32-bit
// halves v0 (plaintext[63:32]) and v1 (plaintext[31:0]), under a 128-bit key
// k0..k3 (k0 = key[127:96] ... k3 = key[31:0]). Each of the 32 cycles adds
// delta = 0x9E3779B9 to a running sum and performs two Feistel rounds:
//   v0 += ((v1 << 4) + k0) ^ (v1 + sum) ^ ((v1 >> 5) + k1)
//   v1 += ((v0 << 4) + k2) ^ (v0 + sum) ^ ((v0 >> 5) + k3)
// with all additions modulo 2^32. The ciphertext is {v0, v1} after 32 cycles.
// The unit has no clock: the ciphertext follows the inputs after the
// propagation delay of the 64 rounds, as in the design, which describes the
// TEA module as asynchronous. The 64-bit block and the word order of key and
// block are those of the published algorithm and its test vectors; packing
// the words into one 128-bit key port and one 64-bit block port is this
// design's choice.
//
// Ports: key (128 bits), plaintext (64 bits) -> ciphertext (64 bits).
module tea_encrypt
  import dh_tea_pkg::*;
(
  input  logic [127:0] key,
  input  logic [63:0]  plaintext,
  output logic [63:0]  ciphertext
);

  logic [31:0] k0, k1, k2, k3;
  assign {k0, k1, k2, k3} = key;

  always_comb begin
    logic [31:0] v0, v1, sum;
    v0  = plaintext[63:32];
    v1  = plaintext[31:0];
    sum = '0;
    for (int unsigned i = 0; i < TEA_CYCLES; i++) begin
      sum = sum + TEA_DELTA;
      v0  = v0 + (((v1 << 4) + k0) ^ (v1 + sum) ^ ((v1 >> 5) + k1));
      v1  = v1 + (((v0 << 4) + k2) ^ (v0 + sum) ^ ((v0 >> 5) + k3));
    end
    ciphertext = {v0, v1};
  end

endmodule
