// aes_ctrl: counters and next-state logic of the AES core.
//
// Three counters, as in the published control logic: a 4-bit round counter
// (0 during loading, 1..10 for the rounds), a 4-bit byte counter and a 2-bit
// counter for the MixColumns input byte. The state machine walks through
//   IDLE -> load 16 x (LD_KEY, LD_PT, LD_WR)
//        -> for round 1..10:
//             key schedule 16 x (KS_SET, KS_SBOX | KS_XOR, [KS_RC], KS_WR)
//             rounds 1..9: 16 x (4 x MC_IN, MC_KEY, MC_WR)
//             round 10   : 16 x (LR_SUB, LR_KEY, LR_WR)
//        -> IDLE
// i.e. 48 + 9 x (49 + 96) + 49 + 48 = 1450 cycles from the first load cycle
// to the last ciphertext byte. start is sampled only in IDLE; done pulses in
// the cycle the last ciphertext byte is presented. The key schedule of a round
// runs before its state update because AddRoundKey needs the new key; bytes
// are updated in increasing order because k_j depends on k_{j-4}. This
// schedule is this design's own: the published core needs 1471 cycles and
// does not detail its schedule. Synchronous active-high reset.
module aes_ctrl
  import aes_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  output ctrl_state_e state,
  output logic [3:0]  round,
  output logic [3:0]  byte_idx,
  output logic [1:0]  mc,
  output logic        busy,
  output logic        done
);

  logic last_byte;

  assign last_byte = (byte_idx == 4'd15);
  assign busy      = (state != S_IDLE);
  assign done      = (state == S_LR_WR) && last_byte;

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      round    <= '0;
      byte_idx <= '0;
      mc       <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state    <= S_LD_KEY;
          round    <= '0;
          byte_idx <= '0;
          mc       <= '0;
        end
        S_LD_KEY: state <= S_LD_PT;
        S_LD_PT:  state <= S_LD_WR;
        S_LD_WR: begin
          byte_idx <= byte_idx + 4'd1;
          if (last_byte) begin
            state <= S_KS_SET;
            round <= 4'd1;
          end else begin
            state <= S_LD_KEY;
          end
        end
        S_KS_SET:  state <= (byte_idx < 4'd4) ? S_KS_SBOX : S_KS_XOR;
        S_KS_SBOX: state <= (byte_idx == 4'd0) ? S_KS_RC : S_KS_WR;
        S_KS_RC:   state <= S_KS_WR;
        S_KS_XOR:  state <= S_KS_WR;
        S_KS_WR: begin
          byte_idx <= byte_idx + 4'd1;
          if (!last_byte)                   state <= S_KS_SET;
          else if (round == 4'(NUM_ROUNDS)) state <= S_LR_SUB;
          else                              state <= S_MC_IN;
        end
        S_MC_IN: begin
          mc <= mc + 2'd1;
          if (mc == 2'd3) state <= S_MC_KEY;
        end
        S_MC_KEY: state <= S_MC_WR;
        S_MC_WR: begin
          byte_idx <= byte_idx + 4'd1;
          if (last_byte) begin
            state <= S_KS_SET;
            round <= round + 4'd1;
          end else begin
            state <= S_MC_IN;
          end
        end
        S_LR_SUB: state <= S_LR_KEY;
        S_LR_KEY: state <= S_LR_WR;
        S_LR_WR: begin
          byte_idx <= byte_idx + 4'd1;
          if (last_byte) state <= S_IDLE;
          else           state <= S_LR_SUB;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The round counter never leaves 0..NUM_ROUNDS
  a_round_range: assert property (@(posedge clk) disable iff (rst) round <= 4'(NUM_ROUNDS));
  // MixColumns accumulation only runs in rounds 1..NUM_ROUNDS-1
  a_mc_rounds: assert property (@(posedge clk) disable iff (rst)
                                (state == S_MC_IN) |-> (round >= 4'd1 && round < 4'(NUM_ROUNDS)));

endmodule
