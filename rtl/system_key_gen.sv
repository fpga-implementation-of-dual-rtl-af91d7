// system_key_gen: forms the 128-bit system key from the user's 8-bit SEED.
//
//   offset     = SEED[7:4] ^ SEED[3:0]
//   system key = { STORED_KEY[offset] (120 bits), SEED (8 bits) }
//
// The three steps and all widths follow the document. Sixteen 120-bit keys are stored in a
// look-up table. The document does not give their values; this design fills them with a fixed
// formula so that no numbers have to be pasted into the source: byte b (b = 0 is the most
// significant) of stored key j is the standard AES S-box value of 15*j + b. Any other
// constants can be substituted. Purely combinational.
module system_key_gen
  import aes_pkg::*;
(
  input  byte_t       seed,
  output logic [3:0]  offset,
  output block_t      system_key
);

  typedef logic [15:0][119:0] key_table_t;

  function automatic key_table_t build_key_table();
    key_table_t  t;
    sbox_table_t s = build_sbox_table();
    for (int j = 0; j < 16; j++)
      for (int b = 0; b < 15; b++)
        t[j][119-8*b -: 8] = s[15*j + b];
    return t;
  endfunction

  localparam key_table_t STORED_KEY = build_key_table();

  assign offset     = seed[7:4] ^ seed[3:0];
  assign system_key = {STORED_KEY[offset], seed};

endmodule
