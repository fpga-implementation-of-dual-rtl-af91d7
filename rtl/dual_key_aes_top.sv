// dual_key_aes_top: 512-bit dual-key AES encryptor and decryptor side by side.
//
// Each direction splits its 512-bit data and 512-bit user key into four 128-bit lanes
// (lane i = bits [128*i+127 : 128*i]) and runs them through four parallel 128-bit cores, as
// in the document's four-instance schematics. One 8-bit seed per direction feeds a single
// system_key_gen, whose 128-bit system key is shared by the four lanes of that direction.
//
// Encryption: enc_start (sampled while enc_busy is low) captures enc_datain, enc_key and
// enc_seed; enc_done rises 40 clocks later with the ciphertext on enc_dataout.
// Decryption: dec_start captures dec_datain (ciphertext), dec_key and dec_seed; dec_done rises
// 50 clocks later (10 clocks of key expansion, then 40) with the plaintext on dec_dataout.
// Both done flags stay high until the next start of their direction. rst_n is an active-low
// synchronous reset. The lanes of one direction always run in lock step, so done is
// taken from lane 0 and busy from any lane.
// The 512-bit width, the four lanes and the 40-clock encryption follow the document; sharing
// one seed and one system key across the lanes is this design's choice.
module dual_key_aes_top
  import aes_pkg::*;
#(
  parameter int unsigned LANES      = 4,
  parameter bit          KEYED_SBOX = 1'b1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // encryption
  input  logic                   enc_start,
  input  logic [128*LANES-1:0]   enc_datain,
  input  logic [128*LANES-1:0]   enc_key,
  input  byte_t                  enc_seed,
  output logic [128*LANES-1:0]   enc_dataout,
  output logic                   enc_busy,
  output logic                   enc_done,
  // decryption
  input  logic                   dec_start,
  input  logic [128*LANES-1:0]   dec_datain,
  input  logic [128*LANES-1:0]   dec_key,
  input  byte_t                  dec_seed,
  output logic [128*LANES-1:0]   dec_dataout,
  output logic                   dec_busy,
  output logic                   dec_done
);

  block_t     enc_sys_key, dec_sys_key;
  logic [3:0] enc_offset, dec_offset;
  logic [LANES-1:0] enc_busy_l, enc_done_l, dec_busy_l, dec_done_l;

  system_key_gen u_enc_skg (.seed(enc_seed), .offset(enc_offset), .system_key(enc_sys_key));
  system_key_gen u_dec_skg (.seed(dec_seed), .offset(dec_offset), .system_key(dec_sys_key));

  for (genvar i = 0; i < LANES; i++) begin : g_lane
    dual_key_aes_enc #(.KEYED_SBOX(KEYED_SBOX)) u_enc (
      .clk      (clk),
      .rst_n    (rst_n),
      .start    (enc_start),
      .data_in  (enc_datain[128*i +: 128]),
      .user_key (enc_key[128*i +: 128]),
      .sys_key  (enc_sys_key),
      .data_out (enc_dataout[128*i +: 128]),
      .busy     (enc_busy_l[i]),
      .done     (enc_done_l[i])
    );
    dual_key_aes_dec #(.KEYED_SBOX(KEYED_SBOX)) u_dec (
      .clk      (clk),
      .rst_n    (rst_n),
      .start    (dec_start),
      .data_in  (dec_datain[128*i +: 128]),
      .user_key (dec_key[128*i +: 128]),
      .sys_key  (dec_sys_key),
      .data_out (dec_dataout[128*i +: 128]),
      .busy     (dec_busy_l[i]),
      .done     (dec_done_l[i])
    );
  end

  assign enc_busy = |enc_busy_l;
  assign enc_done = enc_done_l[0];
  assign dec_busy = |dec_busy_l;
  assign dec_done = dec_done_l[0];

  // All lanes of a direction start together and take the same number of clocks.
  a_enc_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
                                   (&enc_done_l) || !(|enc_done_l));
  a_dec_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
                                   (&dec_done_l) || !(|dec_done_l));

endmodule
