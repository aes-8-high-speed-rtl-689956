// aes_sbox - the 8-bit AES S-box (SubBytes on one byte), combinational.
//
// The design has two of these: one in the encryption block for SubBytes and one in the key
// expansion for SubWord, so round operation and key generation never compete for it.
// The substitution is a 256-entry look-up table; its contents are generated at elaboration by
// aes8_pkg::sbox_table() (GF(2^8) inverse then affine transform), which a synthesis tool maps
// to LUT logic or a ROM. Interface: din -> dout, no clock, zero latency.
module aes_sbox
  import aes8_pkg::*;
(
  input  byte_t din,
  output byte_t dout
);
  localparam sbox_table_t TABLE = sbox_table();

  assign dout = TABLE[din];
endmodule
