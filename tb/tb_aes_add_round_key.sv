// tb_aes_add_round_key: AddRoundKey against FIPS-197 Appendix B (end of round 1) and random
// states; applying the same key twice must give back the state.
module tb_aes_add_round_key;
  logic [127:0] s, k, o, o2;
  aes_add_round_key dut  (.state_in(s), .round_key(k), .state_out(o));
  aes_add_round_key dut2 (.state_in(o), .round_key(k), .state_out(o2));

  int checks = 0, failures = 0;

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s = 128'h046681e5e0cb199a48f8d37a2806264c;
    k = 128'ha0fafe1788542cb123a339392a6c7605;
    #1 check("fips", o, 128'ha49c7ff2689f352b6b5bea43026a5049);
    for (int t = 0; t < 100; t++) begin
      s = {$urandom, $urandom, $urandom, $urandom};
      k = {$urandom, $urandom, $urandom, $urandom};
      #1 check("twice", o2, s);
      for (int b = 0; b < 128; b++) begin
        checks++;
        if (o[b] !== (s[b] != k[b])) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
