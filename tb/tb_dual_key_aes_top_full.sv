// tb_dual_key_aes_top_full: one complete 512-bit operation on the top at its default
// parameters (four lanes, key-based S-bytes): encrypt a precomputed block, check the
// ciphertext and the 40-clock latency, decrypt it, check the plaintext and the 50-clock
// latency.
module tb_dual_key_aes_top_full;
  logic         clk = 1'b0, rst_n = 1'b0;
  logic         enc_start = 1'b0, dec_start = 1'b0;
  logic [511:0] enc_din, enc_key, dec_din, dec_key, enc_dout, dec_dout;
  logic [7:0]   enc_seed, dec_seed;
  logic         enc_busy, enc_done, dec_busy, dec_done;
  int checks = 0, failures = 0;

  localparam logic [511:0] PT = 512'h36f675cc81e74ef5e8e25d940ed904759531985d5d9dc9f81818e811892f902bd23f0824128b2f330c5c7fd0a6a3a4506513270e269e0d37f2a74de452e6b438;
  localparam logic [511:0] KEY = 512'ha170b33839263059f28c105d1fb17c2390c192cfd3ac94af0f21ddb66cad4a268d116ece1738f7d93d9c172411e20b8f6b0d549b6f03675a1600a35a099950d8;
  localparam logic [511:0] CT = 512'h551ae73ea47255f07b1ae9938b8d587e6171c1539e4b7d1c78d6c9af9a6f30e7e2f40296c4afb69ed139c0fcba16fba661fb92570a67abdec0361fb3c4a1b532;

  always #5 clk = ~clk;

  dual_key_aes_top dut (
    .clk, .rst_n,
    .enc_start, .enc_datain(enc_din), .enc_key, .enc_seed, .enc_dataout(enc_dout),
    .enc_busy, .enc_done,
    .dec_start, .dec_datain(dec_din), .dec_key, .dec_seed, .dec_dataout(dec_dout),
    .dec_busy, .dec_done);

  task automatic check(string what, logic [511:0] got, logic [511:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s:\n  got %h\n  exp %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c;
    enc_din = PT; enc_key = KEY; enc_seed = 8'h3c;
    dec_din = '0; dec_key = KEY; dec_seed = 8'h3c;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    @(negedge clk) enc_start = 1'b1;
    @(posedge clk);
    @(negedge clk) enc_start = 1'b0;
    c = 1;                     // the start edge is clock 1
    while (!enc_done) begin @(posedge clk); #1; c++; end
    check("ciphertext", enc_dout, CT);
    check("encryption latency", 512'(c), 512'd40);

    dec_din = enc_dout;
    @(negedge clk) dec_start = 1'b1;
    @(posedge clk);
    @(negedge clk) dec_start = 1'b0;
    c = 1;                     // the start edge is clock 1
    while (!dec_done) begin @(posedge clk); #1; c++; end
    check("plaintext", dec_dout, PT);
    check("decryption latency", 512'(c), 512'd50);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
