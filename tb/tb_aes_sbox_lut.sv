// tb_aes_sbox_lut: checks all 256 entries of the static S-box table against the reference
// model and a few entries against FIPS-197.
module tb_aes_sbox_lut;
  import tb_aes_ref_pkg::*;

  logic [7:0] x, y;
  aes_sbox_lut dut (.sbox_in(x), .sbox_out(y));

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
    x = 8'h00; #1 check("S(00)", 128'(y), 128'h63);
    x = 8'h53; #1 check("S(53)", 128'(y), 128'hed);
    x = 8'h9a; #1 check("S(9a)", 128'(y), 128'hb8);
    for (int v = 0; v < 256; v++) begin
      x = 8'(v);
      #1 check($sformatf("S(%h)", x), 128'(y), 128'(r_sbox(x, 8'h63)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
