// tb_aes_shift_rows: ShiftRows against FIPS-197 Appendix B (round 1) and, for random states,
// against the reference model; InvShiftRows must undo ShiftRows.
module tb_aes_shift_rows;
  import tb_aes_ref_pkg::*;

  logic [127:0] s, f, i;
  aes_shift_rows #(.INVERSE(1'b0)) dut_f (.state_in(s), .state_out(f));
  aes_shift_rows #(.INVERSE(1'b1)) dut_i (.state_in(f), .state_out(i));

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
    s = 128'hd42711aee0bf98f1b8b45de51e415230;
    #1 check("fips", f, 128'hd4bf5d30e0b452aeb84111f11e2798e5);
    check("fips inv", i, s);
    for (int t = 0; t < 200; t++) begin
      s = {$urandom, $urandom, $urandom, $urandom};
      #1 check("fwd", f, r_shift_rows(s, 1'b0));
      check("inv", i, s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
