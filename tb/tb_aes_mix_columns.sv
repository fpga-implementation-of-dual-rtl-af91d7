// tb_aes_mix_columns: MixColumns against FIPS-197 Appendix B (round 1) and, for random states,
// against the reference model; InvMixColumns must undo MixColumns.
module tb_aes_mix_columns;
  import tb_aes_ref_pkg::*;

  logic [127:0] s, f, i;
  aes_mix_columns #(.INVERSE(1'b0)) dut_f (.state_in(s), .state_out(f));
  aes_mix_columns #(.INVERSE(1'b1)) dut_i (.state_in(f), .state_out(i));

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
    s = 128'hd4bf5d30e0b452aeb84111f11e2798e5;
    #1 check("fips", f, 128'h046681e5e0cb199a48f8d37a2806264c);
    check("fips inv", i, s);
    for (int t = 0; t < 200; t++) begin
      s = {$urandom, $urandom, $urandom, $urandom};
      #1 check("fwd", f, r_mix_columns(s, 1'b0));
      check("inv", i, s);
      check("inv ref", i, r_mix_columns(f, 1'b1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
