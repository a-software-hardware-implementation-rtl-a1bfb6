// Shared constants of the Diffie-Hellman / TEA secure-link design.
//
// The TEA constants are those of the published algorithm: the key-schedule
// constant delta = 0x9E3779B9, 32 cycles of two Feistel rounds each, and the
// decryption start value of the running sum, 32*delta mod 2^32 = 0xC6EF3720.
// DH_WIDTH is the operand width of every DH number (128 bits). DH_MODULUS_DEFAULT
// is the constant prime modulus used by the exponentiation units by default:
// 35653 is the value that reproduces the worked key-exchange example
// (911^7 = 16187, 911^6 = 13598, shared key 25697); any prime below 2^128 can be
// set instead. The clock and baud constants give a 50 MHz system clock and a
// 9600 baud serial link between the two nodes.
package dh_tea_pkg;

  localparam int unsigned   DH_WIDTH           = 128;
  localparam logic [127:0]  DH_MODULUS_DEFAULT = 128'd35653;

  localparam int unsigned   TEA_CYCLES   = 32;
  localparam logic [31:0]   TEA_DELTA    = 32'h9E37_79B9;
  localparam logic [31:0]   TEA_DEC_SUM0 = 32'hC6EF_3720;

  localparam int unsigned   CLK_HZ_DEFAULT = 50_000_000;
  localparam int unsigned   BAUD_DEFAULT   = 9600;

endpackage
