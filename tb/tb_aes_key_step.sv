// tb_aes_key_step: expands the FIPS-197 Appendix A.1 key step by step and checks round keys
// 1 and 10 against the standard, and every round key of random keys against the reference.
module tb_aes_key_step;
  import tb_aes_ref_pkg::*;

  logic [127:0] kin, kout;
  logic [3:0]   round;
  aes_key_step dut (.key_in(kin), .round(round), .key_out(kout));

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
    kin = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    for (int r = 1; r <= 10; r++) begin
      round = 4'(r);
      #1;
      if (r == 1)  check("rk1",  kout, 128'ha0fafe1788542cb123a339392a6c7605);
      if (r == 10) check("rk10", kout, 128'hd014f9a8c9ee2589e13f0cc8b6630ca6);
      kin = kout;
    end
    for (int t = 0; t < 30; t++) begin
      logic [127:0] ref_k;
      kin = {$urandom, $urandom, $urandom, $urandom};
      ref_k = kin;
      for (int r = 1; r <= 10; r++) begin
        round = 4'(r);
        #1;
        ref_k = r_key_next(ref_k, r);
        check($sformatf("rk%0d", r), kout, ref_k);
        kin = kout;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
