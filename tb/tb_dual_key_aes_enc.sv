// tb_dual_key_aes_enc: runs the encryptor core on known answers and random blocks.
//  - KEYED_SBOX = 0 instance: FIPS-197 Appendix C.1 and the all-zero AES-128 vector.
//  - default instance: precomputed dual-key vectors and random blocks against the reference.
// Every block must finish exactly 40 clocks after the start edge; a start while busy must be
// ignored, and done must stay high until the next start.
module tb_dual_key_aes_enc;
  import tb_aes_ref_pkg::*;

  localparam int LATENCY = 40;

  logic         clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [127:0] din, key, sk;
  logic [127:0] dout_k, dout_p;
  logic         busy_k, done_k, busy_p, done_p;
  int checks = 0, failures = 0;
  int ignored_starts = 0;

  always #5 clk = ~clk;

  dual_key_aes_enc dut_k (.clk, .rst_n, .start, .data_in(din), .user_key(key), .sys_key(sk),
                          .data_out(dout_k), .busy(busy_k), .done(done_k));
  dual_key_aes_enc #(.KEYED_SBOX(1'b0)) dut_p (.clk, .rst_n, .start, .data_in(din),
                          .user_key(key), .sys_key(sk), .data_out(dout_p), .busy(busy_p),
                          .done(done_p));

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // Starts one block and returns the clocks until done.
  task automatic run(input logic [127:0] p, k, s, output int cycles);
    din = p; key = k; sk = s;
    @(negedge clk) start = 1'b1;
    @(posedge clk);
    @(negedge clk) start = 1'b0;
    din = '0; key = '0; sk = '0;     // inputs need not be held
    cycles = 1;
    while (!done_k) begin
      @(posedge clk);
      cycles++;
      // a second start while busy must have no effect
      if (cycles == 7) begin
        @(negedge clk) start = 1'b1; din = '1; key = '1; sk = '1;
        @(posedge clk) cycles++;
        @(negedge clk) start = 1'b0; din = '0; key = '0; sk = '0;
        ignored_starts++;
      end
    end
    cycles--;  // the loop counted the edge at which done became visible
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    logic [127:0] p, k, s;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    check("done after reset", 128'(done_k), 128'h0);

    run(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f,
        r_system_key(8'h00), n);
    check("plain FIPS C.1", dout_p, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    check("latency", 128'(n), 128'(LATENCY));
    check("done_p", 128'(done_p), 128'h1);
    repeat (5) @(posedge clk);
    check("done held", 128'(done_k), 128'h1);
    check("data held", dout_p, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);

    run(128'h0, 128'h0, r_system_key(8'h00), n);
    check("plain zero", dout_p, 128'h66e94bd4ef8a2c3b884cfa59ca342b2e);
    run(128'h48617269, 128'hff, r_system_key(8'h00), n);
    check("plain lane0", dout_p, 128'h0525651e1a3457d41dd82c692b1416ba);

    run(128'hcd613e30d8f16adf91b7584a2265b1f5, 128'h1e2feb89414c343c1027c4d1c386bbc4,
        r_system_key(8'h7e), n);
    check("keyed vec1", dout_k, 128'h9980a4a86e3dc64d95c27ef948dadb26);
    run(128'h63ca828dd5f4b3b2e4b06ce60741c7a8, 128'hc4647159c324c9859b810e766ec9d286,
        r_system_key(8'h00), n);
    check("keyed vec3", dout_k, 128'h78f87f176fe153a22b413d39dd58d7b0);
    run(128'h05b6e6e307d4bedc51431193e6c3f339, 128'h025b413f8a9a021ea648a7dd06839eb9,
        r_system_key(8'hf0), n);
    check("keyed vec5", dout_k, 128'h32b259818bdf97e7f9e504b536e1ed3a);

    for (int t = 0; t < 8; t++) begin
      p = {$urandom, $urandom, $urandom, $urandom};
      k = {$urandom, $urandom, $urandom, $urandom};
      s = r_system_key(8'($urandom));
      run(p, k, s, n);
      check("keyed random", dout_k, r_encrypt(p, k, s, 1'b1));
      check("plain random", dout_p, r_encrypt(p, k, s, 1'b0));
      check("latency", 128'(n), 128'(LATENCY));
    end
    checks++;
    if (ignored_starts == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
