// aes_key_step: one step of the AES-128 key expansion of the user key.
//
// From round key r-1 (w0..w3, w0 in the top 32 bits) it forms round key r:
//   t  = SubWord(RotWord(w3)) ^ {Rcon(r), 24'h0}
//   w0' = w0 ^ t, w1' = w1 ^ w0', w2' = w2 ^ w1', w3' = w3 ^ w2'
// SubWord uses the conventional static S-box (four aes_sbox_lut instances), as the document
// prescribes for the user-key schedule. round selects Rcon and must be 1..10.
// Purely combinational; the cores register its output once per round.
module aes_key_step
  import aes_pkg::*;
(
  input  block_t      key_in,
  input  logic [3:0]  round,
  output block_t      key_out
);

  word_t w [4];
  word_t rot, sub, t;

  for (genvar i = 0; i < 4; i++) begin : g_w
    assign w[i] = key_in[127-32*i -: 32];
  end

  assign rot = {w[3][23:0], w[3][31:24]};

  for (genvar i = 0; i < 4; i++) begin : g_sub
    aes_sbox_lut u_sbox (.sbox_in(rot[31-8*i -: 8]), .sbox_out(sub[31-8*i -: 8]));
  end

  assign t = sub ^ {rcon(int'(round)), 24'h000000};

  always_comb begin
    word_t p;
    p = w[0] ^ t;
    key_out[127:96] = p;
    p = p ^ w[1];
    key_out[95:64] = p;
    p = p ^ w[2];
    key_out[63:32] = p;
    p = p ^ w[3];
    key_out[31:0] = p;
  end

endmodule
