// aes_sub_bytes: SubBytes (INVERSE = 0) or InvSubBytes (INVERSE = 1) over the 16 state bytes,
// each through its own key-based S-byte.
//
// State byte i uses byte i of the current round's system key as its S-byte key, so the 16
// bytes of a round pass through 16 different key-dependent S-boxes. With KEYED = 0 every
// S-byte gets the constant 8'h63 and the block is plain AES SubBytes; that setting exists to
// check the datapath against published AES results. Purely combinational.
module aes_sub_bytes
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0,
  parameter bit KEYED   = 1'b1
) (
  input  block_t state_in,
  input  block_t sys_key,
  output block_t state_out
);

  for (genvar i = 0; i < 16; i++) begin : g_byte
    byte_t k;
    assign k = KEYED ? sys_key[127-8*i -: 8] : SBOX_CONST;
    keyed_sbox #(.INVERSE(INVERSE)) u_sbox (
      .din      (state_in[127-8*i -: 8]),
      .key_byte (k),
      .dout     (state_out[127-8*i -: 8])
    );
  end

endmodule
