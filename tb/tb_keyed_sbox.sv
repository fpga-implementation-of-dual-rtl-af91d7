// tb_keyed_sbox: checks the forward and inverse key-based S-byte for every input byte and a
// set of key bytes: FIPS-197 S-box values at key 8'h63, agreement with the reference model,
// and that the inverse undoes the forward S-byte.
module tb_keyed_sbox;
  import tb_aes_ref_pkg::*;

  logic [7:0] x, k, y, xi;
  int checks = 0, failures = 0;

  keyed_sbox #(.INVERSE(1'b0)) dut_f (.din(x), .key_byte(k), .dout(y));
  keyed_sbox #(.INVERSE(1'b1)) dut_i (.din(y), .key_byte(k), .dout(xi));

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] kas [5] = '{8'h63, 8'h00, 8'hff, 8'h5a, 8'h17};
    // FIPS-197 S-box entries
    k = 8'h63;
    x = 8'h00; #1 check("S(00)", y, 8'h63);
    x = 8'h01; #1 check("S(01)", y, 8'h7c);
    x = 8'h53; #1 check("S(53)", y, 8'hed);
    x = 8'hff; #1 check("S(ff)", y, 8'h16);
    x = 8'hc9; #1 check("S(c9)", y, 8'hdd);
    foreach (kas[j]) begin
      k = kas[j];
      for (int v = 0; v < 256; v++) begin
        x = 8'(v);
        #1;
        check($sformatf("fwd k=%h x=%h", k, x), y, r_sbox(x, k));
        check($sformatf("inv k=%h x=%h", k, x), xi, x);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
