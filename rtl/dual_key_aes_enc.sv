// dual_key_aes_enc: 128-bit dual-key AES-128 encryptor, one transformation per clock cycle.
//
// Two keys drive the cipher. The user key goes through the standard AES-128 key expansion and
// supplies the AddRoundKey round keys. The system key (from system_key_gen) keys the S-bytes
// of SubBytes. Round 1 uses the system key as given; for each later round the system key is
// XORed with that round's user round key:  SK(1) = SK,  SK(r) = SK(r-1) ^ RK(r).
// Round r is SubBytes(SK(r)) -> ShiftRows -> MixColumns -> AddRoundKey(RK(r)); round 10 omits
// MixColumns; an AddRoundKey with RK(0) = user key comes first.
//
// The state register takes one transformation per clock, so a block needs
// 1 + 9*4 + 3 = 40 clocks, the latency the document reports. Round keys are computed on the
// fly, one aes_key_step per round, so no key schedule is stored.
//
// Interface: start is sampled on a rising clock edge while the core is idle; data_in, user_key
// and sys_key are captured on that edge and need not be held. The initial AddRoundKey happens
// on that edge; done rises after the 40th edge counted from it and stays high, with data_out,
// until the next start. start while busy is ignored. rst_n is an active-low synchronous reset.
// The transformation order and the 40-cycle latency follow the document; the register-level
// schedule, the start/done protocol and the reset are this design's choices.
module dual_key_aes_enc
  import aes_pkg::*;
#(
  parameter bit KEYED_SBOX = 1'b1   // 0: plain AES S-box (for checking against AES vectors)
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

  typedef enum logic [1:0] {PH_SB, PH_SR, PH_MC, PH_ARK} phase_e;

  phase_e     phase;
  logic [3:0] round;
  block_t     state, rk, sk;

  block_t sb_out, sr_out, mc_out, ark_out, ark0_out;
  block_t ks_in, ks_out;
  logic [3:0] ks_round;

  aes_sub_bytes     #(.INVERSE(1'b0), .KEYED(KEYED_SBOX)) u_sb (
    .state_in(state), .sys_key(sk), .state_out(sb_out));
  aes_shift_rows    #(.INVERSE(1'b0)) u_sr (.state_in(state), .state_out(sr_out));
  aes_mix_columns   #(.INVERSE(1'b0)) u_mc (.state_in(state), .state_out(mc_out));
  aes_add_round_key u_ark  (.state_in(state),   .round_key(rk),       .state_out(ark_out));
  aes_add_round_key u_ark0 (.state_in(data_in), .round_key(user_key), .state_out(ark0_out));

  // The key step advances RK(r-1) -> RK(r): from the user key when a block starts, otherwise
  // from the current round key at the end of each round.
  assign ks_in    = busy ? rk : user_key;
  assign ks_round = busy ? round + 4'd1 : 4'd1;
  aes_key_step u_ks (.key_in(ks_in), .round(ks_round), .key_out(ks_out));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase    <= PH_SB;
      round    <= '0;
      state    <= '0;
      rk       <= '0;
      sk       <= '0;
      data_out <= '0;
      busy     <= 1'b0;
      done     <= 1'b0;
    end else if (!busy) begin
      if (start) begin
        state <= ark0_out;          // initial AddRoundKey with RK(0)
        rk    <= ks_out;            // RK(1)
        sk    <= sys_key;           // SK(1)
        round <= 4'd1;
        phase <= PH_SB;
        busy  <= 1'b1;
        done  <= 1'b0;
      end
    end else begin
      unique case (phase)
        PH_SB: begin
          state <= sb_out;
          phase <= PH_SR;
        end
        PH_SR: begin
          state <= sr_out;
          phase <= (round == 4'(NR)) ? PH_ARK : PH_MC;
        end
        PH_MC: begin
          state <= mc_out;
          phase <= PH_ARK;
        end
        PH_ARK: begin
          state <= ark_out;
          if (round == 4'(NR)) begin
            data_out <= ark_out;
            busy     <= 1'b0;
            done     <= 1'b1;
          end else begin
            rk    <= ks_out;        // RK(r+1)
            sk    <= sk ^ ks_out;   // SK(r+1) = SK(r) ^ RK(r+1)
            round <= round + 4'd1;
          end
          phase <= PH_SB;
        end
        default: phase <= PH_SB;
      endcase
    end
  end

  // A finished block is never reported while another one is in flight.
  a_done_idle: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !done);
  a_round_range: assert property (@(posedge clk) disable iff (!rst_n)
                                  busy |-> (round >= 4'd1 && round <= 4'(NR)));

endmodule
