// aes_mix_columns: MixColumns (INVERSE = 0) or InvMixColumns (INVERSE = 1).
//
// Each of the four state columns is taken as a polynomial over GF(2^8) and multiplied modulo
// x^4 + 1 by c(x) = 03x^3 + 01x^2 + 01x + 02, or by its inverse 0Bx^3 + 0Dx^2 + 09x + 0E.
// Purely combinational.
module aes_mix_columns
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  block_t state_in,
  output block_t state_out
);

  for (genvar c = 0; c < 4; c++) begin : g_col
    assign state_out[127-32*c -: 32] = mix_column(state_in[127-32*c -: 32], INVERSE);
  end

endmodule
