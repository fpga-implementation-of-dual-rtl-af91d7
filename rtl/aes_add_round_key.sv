// aes_add_round_key: AddRoundKey, the bitwise XOR of the state with a round key of the user
// key schedule. It is its own inverse, so encryption and decryption share it; decryption only
// applies the round keys in reverse order. Purely combinational.
module aes_add_round_key
  import aes_pkg::*;
(
  input  block_t state_in,
  input  block_t round_key,
  output block_t state_out
);

  assign state_out = state_in ^ round_key;

endmodule
