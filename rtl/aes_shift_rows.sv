// aes_shift_rows: ShiftRows (INVERSE = 0) or InvShiftRows (INVERSE = 1).
//
// Row r of the 4x4 state is rotated left by r bytes (right by r bytes for the inverse); row 0
// is unchanged. With byte i in row i%4 and column i/4, forward output byte i is input byte
// (i + 4*(i%4)) mod 16. Purely combinational wiring.
module aes_shift_rows
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  block_t state_in,
  output block_t state_out
);

  for (genvar i = 0; i < 16; i++) begin : g_byte
    localparam int unsigned J = (i + 4 * (i % 4)) % 16;
    if (!INVERSE) begin : g_fwd
      assign state_out[127-8*i -: 8] = state_in[127-8*J -: 8];
    end else begin : g_inv
      assign state_out[127-8*J -: 8] = state_in[127-8*i -: 8];
    end
  end

endmodule
