// dual_key_aes_dec: 128-bit dual-key AES-128 decryptor, the exact inverse of dual_key_aes_enc.
//
// Decryption needs the user round keys and the system keys in reverse order, starting from
// round 10. A block therefore runs in two phases:
//  1. Key expansion (10 clocks, counting the start edge): RK(1)..RK(10) of the user key are
//     computed with aes_key_step and stored in an 11-entry round-key register file, while the
//     system key is run forward to SK(10) = SK ^ RK(2) ^ ... ^ RK(10).
//  2. Inverse rounds (40 clocks): round r, from 10 down to 1, is
//     AddRoundKey(RK(r)) -> InvMixColumns (not in round 10) -> InvShiftRows ->
//     InvSubBytes(SK(r)), after which the system key is stepped back, SK(r-1) = SK(r) ^ RK(r).
//     A final AddRoundKey with RK(0) ends the block.
// So the first ciphertext-dependent step happens 10 clocks after start and done rises after
// 50 clocks. The inverse round order is the one the document draws for decryption; the
// stored key schedule, and with it the 10 extra clocks, is this design's choice.
//
// Interface as dual_key_aes_enc: start sampled while idle captures data_in (ciphertext),
// user_key and sys_key; done rises when data_out (plaintext) is valid and stays high until
// the next start. rst_n is an active-low synchronous reset.
module dual_key_aes_dec
  import aes_pkg::*;
#(
  parameter bit KEYED_SBOX = 1'b1   // 0: plain AES inverse S-box
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  block_t data_in,
  input  block_t user_key,
  input  block_t sys_key,
  output block_t data_out,
  output logic   busy,
  output logic   done
);

  typedef enum logic [2:0] {PH_EXP, PH_ARK, PH_IMC, PH_ISR, PH_ISB} phase_e;

  phase_e     phase;
  logic [3:0] round;
  block_t     state, sk;
  block_t     rk_mem [NR+1];

  block_t isb_out, isr_out, imc_out, ark_out;
  block_t ks_in, ks_out;
  logic [3:0] ks_round;

  aes_sub_bytes     #(.INVERSE(1'b1), .KEYED(KEYED_SBOX)) u_isb (
    .state_in(state), .sys_key(sk), .state_out(isb_out));
  aes_shift_rows    #(.INVERSE(1'b1)) u_isr (.state_in(state), .state_out(isr_out));
  aes_mix_columns   #(.INVERSE(1'b1)) u_imc (.state_in(state), .state_out(imc_out));
  aes_add_round_key u_ark (.state_in(state), .round_key(rk_mem[round]), .state_out(ark_out));

  // Key expansion: RK(0) -> RK(1) at the start edge, then RK(r-1) -> RK(r) in PH_EXP.
  assign ks_in    = busy ? rk_mem[round - 4'd1] : user_key;
  assign ks_round = busy ? round : 4'd1;
  aes_key_step u_ks (.key_in(ks_in), .round(ks_round), .key_out(ks_out));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase    <= PH_EXP;
      round    <= '0;
      state    <= '0;
      sk       <= '0;
      data_out <= '0;
      busy     <= 1'b0;
      done     <= 1'b0;
      for (int i = 0; i <= NR; i++) rk_mem[i] <= '0;
    end else if (!busy) begin
      if (start) begin
        state     <= data_in;
        rk_mem[0] <= user_key;
        rk_mem[1] <= ks_out;
        sk        <= sys_key;     // SK(1)
        round     <= 4'd2;
        phase     <= PH_EXP;
        busy      <= 1'b1;
        done      <= 1'b0;
      end
    end else begin
      unique case (phase)
        PH_EXP: begin
          rk_mem[round] <= ks_out;
          sk            <= sk ^ ks_out;   // SK(r) = SK(r-1) ^ RK(r)
          if (round == 4'(NR)) phase <= PH_ARK;
          else                 round <= round + 4'd1;
        end
        PH_ARK: begin
          state <= ark_out;
          if (round == 4'd0) begin
            data_out <= ark_out;
            busy     <= 1'b0;
            done     <= 1'b1;
            phase    <= PH_EXP;
          end else begin
            phase <= (round == 4'(NR)) ? PH_ISR : PH_IMC;
          end
        end
        PH_IMC: begin
          state <= imc_out;
          phase <= PH_ISR;
        end
        PH_ISR: begin
          state <= isr_out;
          phase <= PH_ISB;
        end
        PH_ISB: begin
          state <= isb_out;
          if (round >= 4'd2) sk <= sk ^ rk_mem[round];   // SK(r-1) = SK(r) ^ RK(r)
          round <= round - 4'd1;
          phase <= PH_ARK;
        end
        default: phase <= PH_EXP;
      endcase
    end
  end

  a_done_idle: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !done);
  a_round_range: assert property (@(posedge clk) disable iff (!rst_n)
                                  busy |-> (round <= 4'(NR)));

endmodule
