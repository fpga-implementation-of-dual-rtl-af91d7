// tb_system_key_gen: checks the offset (XOR of the seed nibbles) and the 128-bit system key
// for all 256 seeds against the reference model, and a few keys against precomputed values.
module tb_system_key_gen;
  import tb_aes_ref_pkg::*;

  logic [7:0]   seed;
  logic [3:0]   offset;
  logic [127:0] key;
  system_key_gen dut (.seed(seed), .offset(offset), .system_key(key));

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
    seed = 8'h00; #1 check("seed 00", key, 128'h637c777bf26b6fc53001672bfed7ab00);
    seed = 8'h7e; #1 check("seed 7e", key, 128'h17c4a77e3d645d197360814fdc222a7e);
    seed = 8'ha5; #1 check("seed a5", key, 128'hf8981169d98e949b1e87e9ce5528dfa5);
    seed = 8'hff; #1 check("seed ff", key, 128'h637c777bf26b6fc53001672bfed7abff);
    for (int v = 0; v < 256; v++) begin
      seed = 8'(v);
      #1;
      check("offset", 128'(offset), 128'(seed[7:4] ^ seed[3:0]));
      check("key", key, r_system_key(seed));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
