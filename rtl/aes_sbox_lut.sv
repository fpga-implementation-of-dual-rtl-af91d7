// aes_sbox_lut: the conventional, static AES S-box as a 256-entry lookup table.
//
// The user-key schedule uses this fixed S-box, so that decryption can rebuild the same round
// keys without depending on the system key. The table is filled at elaboration time from the
// S-box formula (multiplicative inverse in GF(2^8) followed by the affine map with constant
// 8'h63), so no numbers are stored in the source; it synthesizes to a 256x8 ROM.
// Purely combinational: sbox_out follows sbox_in in the same cycle.
module aes_sbox_lut
  import aes_pkg::*;
(
  input  byte_t sbox_in,
  output byte_t sbox_out
);

  localparam sbox_table_t TABLE = build_sbox_table();

  assign sbox_out = TABLE[sbox_in];

endmodule
