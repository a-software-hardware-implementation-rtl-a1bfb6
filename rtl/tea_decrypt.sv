// TEA block decryption, fully unrolled and combinational.
//
// The inverse of tea_encrypt: the 64-bit ciphertext {v0, v1} is deciphered
// under the same 128-bit key k0..k3 (k0 = key[127:96]). The running sum starts
// at 32*delta mod 2^32 = 0xC6EF3720 and each of the 32 cycles undoes the two
// Feistel rounds in reverse order before subtracting delta:
//   v1 -= ((v0 << 4) + k2) ^ (v0 + sum) ^ ((v0 >> 5) + k3)
//   v0 -= ((v1 << 4) + k0) ^ (v1 + sum) ^ ((v1 >> 5) + k1)
// The unit has no clock (asynchronous, as the design's TEA modules are); the
// port packing is this design's choice, the algorithm is the published one.
//
// Ports: key (128 bits), ciphertext (64 bits) -> plaintext (64 bits).
module tea_decrypt
  import dh_tea_pkg::*;
(
  input  logic [127:0] key,
  input  logic [63:0]  ciphertext,
  output logic [63:0]  plaintext
);

  logic [31:0] k0, k1, k2, k3;
  assign {k0, k1, k2, k3} = key;

  always_comb begin
    logic [31:0] v0, v1, sum;
    v0  = ciphertext[63:32];
    v1  = ciphertext[31:0];
    sum = TEA_DEC_SUM0;
    for (int unsigned i = 0; i < TEA_CYCLES; i++) begin
      v1  = v1 - (((v0 << 4) + k2) ^ (v0 + sum) ^ ((v0 >> 5) + k3));
      v0  = v0 - (((v1 << 4) + k0) ^ (v1 + sum) ^ ((v1 >> 5) + k1));
      sum = sum - TEA_DELTA;
    end
    plaintext = {v0, v1};
  end

endmodule
