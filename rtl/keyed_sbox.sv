// keyed_sbox: one key-based S-byte, generated by computation instead of a stored table.
//
// Forward (INVERSE = 0):  y = L(x^-1) ^ k
// Inverse (INVERSE = 1):  x = (L^-1(y ^ k))^-1
// where x^-1 is the inverse in GF(2^8) (0 maps to 0) and L is the linear part of the AES
// affine map. The byte k comes from the system key, so every key gives a different S-box; with
// k = 8'h63 the block is the standard AES S-box (or its inverse). Generating the S-byte by
// arithmetic rather than a look-up table follows the document's choice of dynamic S-byte
// generation; how k enters the S-byte is this design's own choice.
// Purely combinational.
module keyed_sbox
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  byte_t din,
  input  byte_t key_byte,
  output byte_t dout
);

  always_comb begin
    if (INVERSE) dout = keyed_inv_sub(din, key_byte);
    else         dout = keyed_sub(din, key_byte);
  end

endmodule
