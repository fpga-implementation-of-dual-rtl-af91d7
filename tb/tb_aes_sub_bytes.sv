// tb_aes_sub_bytes: SubBytes with KEYED = 0 against FIPS-197 Appendix B, keyed SubBytes
// against a precomputed vector and the reference model, and InvSubBytes undoing SubBytes.
module tb_aes_sub_bytes;
  import tb_aes_ref_pkg::*;

  logic [127:0] s, k, f, i, p;
  aes_sub_bytes #(.INVERSE(1'b0), .KEYED(1'b1)) dut_f (.state_in(s), .sys_key(k), .state_out(f));
  aes_sub_bytes #(.INVERSE(1'b1), .KEYED(1'b1)) dut_i (.state_in(f), .sys_key(k), .state_out(i));
  aes_sub_bytes #(.INVERSE(1'b0), .KEYED(1'b0)) dut_p (.state_in(s), .sys_key(k), .state_out(p));

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
    s = 128'h193de3bea0f4e22b9ac68d2ae9f84808;
    k = 128'h000102030405060708090a0b0c0d0e0f;
    #1 check("plain fips", p, 128'hd42711aee0bf98f1b8b45de51e415230);
    check("keyed vector", f, 128'hb74570ce87d9fd95d3de348d712f3f5c);
    check("keyed inv", i, s);
    for (int t = 0; t < 100; t++) begin
      s = {$urandom, $urandom, $urandom, $urandom};
      k = {$urandom, $urandom, $urandom, $urandom};
      #1 check("fwd", f, r_sub_bytes(s, k, 1'b0, 1'b1));
      check("inv", i, s);
      check("plain", p, r_sub_bytes(s, k, 1'b0, 1'b0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
