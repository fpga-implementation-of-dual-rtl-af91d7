// tb_dual_key_aes_top: end-to-end test of the 512-bit dual-key AES top.
//
// Two tops run side by side: the default one (key-based S-bytes) and one with KEYED_SBOX = 0,
// which must reproduce plain AES-128 on each lane. The test
//  - encrypts the published 512-bit test case (data 512'd1214345833, key 512'hff) on the plain
//    top, checks the published ciphertext, and decrypts it back;
//  - encrypts and decrypts a precomputed 512-bit dual-key vector with both directions busy
//    at the same time;
//  - runs random 512-bit blocks with seeds chosen to select all 16 stored system keys, checking
//    every lane against the reference model and the round trip through the decryptor;
//  - restarts while busy (must be ignored) and checks the 40 and 50 clock latencies.
// Each mechanism is counted and a mechanism that never happened counts as a failure.
module tb_dual_key_aes_top;
  import tb_aes_ref_pkg::*;

  localparam int ENC_LAT = 40;
  localparam int DEC_LAT = 50;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         enc_start = 1'b0, dec_start = 1'b0;
  logic [511:0] enc_din, enc_key, dec_din, dec_key;
  logic [7:0]   enc_seed, dec_seed;
  logic [511:0] enc_dout, dec_dout, enc_dout_p, dec_dout_p;
  logic         enc_busy, enc_done, dec_busy, dec_done;
  logic         enc_busy_p, enc_done_p, dec_busy_p, dec_done_p;

  int checks = 0, failures = 0;
  int n_enc = 0, n_dec = 0, n_overlap = 0, n_ignored = 0, n_keyed_differs = 0;
  bit offsets_seen [16];

  always #5 clk = ~clk;

  dual_key_aes_top dut (
    .clk, .rst_n,
    .enc_start, .enc_datain(enc_din), .enc_key, .enc_seed, .enc_dataout(enc_dout),
    .enc_busy, .enc_done,
    .dec_start, .dec_datain(dec_din), .dec_key, .dec_seed, .dec_dataout(dec_dout),
    .dec_busy, .dec_done);

  dual_key_aes_top #(.KEYED_SBOX(1'b0)) dut_plain (
    .clk, .rst_n,
    .enc_start, .enc_datain(enc_din), .enc_key, .enc_seed, .enc_dataout(enc_dout_p),
    .enc_busy(enc_busy_p), .enc_done(enc_done_p),
    .dec_start, .dec_datain(dec_din), .dec_key, .dec_seed, .dec_dataout(dec_dout_p),
    .dec_busy(dec_busy_p), .dec_done(dec_done_p));

  task automatic check(string what, logic [511:0] got, logic [511:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s:\n  got %h\n  exp %h", what, got, exp);
    end
  endtask

  // Starts encryption and/or decryption on the same edge and waits for both; returns latencies.
  task automatic run(input bit do_enc, input bit do_dec, input bit poke,
                     output int enc_cycles, output int dec_cycles);
    int c = 0;
    enc_cycles = -1;
    dec_cycles = -1;
    @(negedge clk);
    enc_start = do_enc;
    dec_start = do_dec;
    @(posedge clk);
    @(negedge clk);
    enc_start = 1'b0;
    dec_start = 1'b0;
    c = 2;                     // the start edge was the first clock of the operation
    if (do_enc && do_dec) n_overlap++;
    while ((do_enc && enc_cycles < 0) || (do_dec && dec_cycles < 0)) begin
      if (poke && c == 13) begin
        enc_start = do_enc;
        dec_start = do_dec;
        n_ignored++;
      end else begin
        enc_start = 1'b0;
        dec_start = 1'b0;
      end
      @(posedge clk);
      #1;
      if (do_enc && enc_cycles < 0 && enc_done) enc_cycles = c;
      if (do_dec && dec_cycles < 0 && dec_done) dec_cycles = c;
      c++;
      @(negedge clk);
    end
    enc_start = 1'b0;
    dec_start = 1'b0;
    if (do_enc) n_enc++;
    if (do_dec) n_dec++;
  endtask

  function automatic logic [511:0] ref_enc(logic [511:0] p, logic [511:0] k, logic [7:0] s,
                                           bit keyed);
    logic [511:0] o;
    for (int i = 0; i < 4; i++)
      o[128*i +: 128] = r_encrypt(p[128*i +: 128], k[128*i +: 128], r_system_key(s), keyed);
    return o;
  endfunction

  function automatic logic [511:0] ref_dec(logic [511:0] c, logic [511:0] k, logic [7:0] s,
                                           bit keyed);
    logic [511:0] o;
    for (int i = 0; i < 4; i++)
      o[128*i +: 128] = r_decrypt(c[128*i +: 128], k[128*i +: 128], r_system_key(s), keyed);
    return o;
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ne, nd;
    logic [511:0] p, k, ct;
    logic [7:0] s;
    enc_din = '0; enc_key = '0; enc_seed = '0;
    dec_din = '0; dec_key = '0; dec_seed = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // Published test case: plain AES-128 on four lanes.
    enc_din = 512'd1214345833;
    enc_key = 512'hff;
    run(1'b1, 1'b0, 1'b0, ne, nd);
    check("published ciphertext", enc_dout_p,
          {128'h66e94bd4ef8a2c3b884cfa59ca342b2e, 128'h66e94bd4ef8a2c3b884cfa59ca342b2e,
           128'h66e94bd4ef8a2c3b884cfa59ca342b2e, 128'h0525651e1a3457d41dd82c692b1416ba});
    check("enc latency", 512'(ne), 512'(ENC_LAT));
    dec_din = enc_dout_p;
    dec_key = 512'hff;
    run(1'b0, 1'b1, 1'b0, ne, nd);
    check("published plaintext", dec_dout_p, 512'd1214345833);
    check("dec latency", 512'(nd), 512'(DEC_LAT));

    // Precomputed dual-key vector, both directions at once.
    p  = 512'h36f675cc81e74ef5e8e25d940ed904759531985d5d9dc9f81818e811892f902bd23f0824128b2f330c5c7fd0a6a3a4506513270e269e0d37f2a74de452e6b438;
    k  = 512'ha170b33839263059f28c105d1fb17c2390c192cfd3ac94af0f21ddb66cad4a268d116ece1738f7d93d9c172411e20b8f6b0d549b6f03675a1600a35a099950d8;
    ct = 512'h551ae73ea47255f07b1ae9938b8d587e6171c1539e4b7d1c78d6c9af9a6f30e7e2f40296c4afb69ed139c0fcba16fba661fb92570a67abdec0361fb3c4a1b532;
    enc_din = p;  enc_key = k; enc_seed = 8'h3c;
    dec_din = ct; dec_key = k; dec_seed = 8'h3c;
    run(1'b1, 1'b1, 1'b1, ne, nd);
    check("keyed vector enc", enc_dout, ct);
    check("keyed vector dec", dec_dout, p);
    check("enc latency", 512'(ne), 512'(ENC_LAT));
    check("dec latency", 512'(nd), 512'(DEC_LAT));
    offsets_seen[4'h3 ^ 4'hc] = 1'b1;

    // Random blocks, one seed per stored system key.
    for (int j = 0; j < 16; j++) begin
      p = {16{$urandom}};
      k = {16{$urandom}};
      s = {4'($urandom), 4'($urandom)};
      s[3:0] = s[7:4] ^ 4'(j);             // offset = j
      enc_din = p; enc_key = k; enc_seed = s;
      run(1'b1, 1'b0, (j % 4) == 1, ne, nd);
      check("random enc", enc_dout, ref_enc(p, k, s, 1'b1));
      check("random enc plain", enc_dout_p, ref_enc(p, k, s, 1'b0));
      check("enc latency", 512'(ne), 512'(ENC_LAT));
      if (enc_dout != enc_dout_p) n_keyed_differs++;
      if (dut.enc_offset == 4'(j)) offsets_seen[j] = 1'b1;
      dec_din = enc_dout; dec_key = k; dec_seed = s;
      run(1'b0, 1'b1, (j % 4) == 2, ne, nd);
      check("round trip", dec_dout, p);
      check("random dec", dec_dout, ref_dec(dec_din, k, s, 1'b1));
      check("dec latency", 512'(nd), 512'(DEC_LAT));
    end

    // Mechanism coverage.
    foreach (offsets_seen[j]) begin
      checks++;
      if (!offsets_seen[j]) begin failures++; $display("FAIL offset %0d never used", j); end
    end
    checks += 5;
    if (n_enc == 0)           begin failures++; $display("FAIL no encryption");  end
    if (n_dec == 0)           begin failures++; $display("FAIL no decryption");  end
    if (n_overlap == 0)       begin failures++; $display("FAIL no overlap");     end
    if (n_ignored == 0)       begin failures++; $display("FAIL no busy start");  end
    if (n_keyed_differs == 0) begin failures++; $display("FAIL keyed = plain");  end
    $display("mechanisms: enc=%0d dec=%0d overlap=%0d ignored_starts=%0d keyed_differs=%0d",
             n_enc, n_dec, n_overlap, n_ignored, n_keyed_differs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
