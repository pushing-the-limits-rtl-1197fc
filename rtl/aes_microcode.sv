// aes_microcode: control-word decoder of the AES core.
//
// Combinational: maps the controller state (and, while MixColumns inputs are
// accumulated, the 2-bit MixColumns counter) to one ctrl_word_t that drives
// the multiplexer selects, the MC&KA operation and enable, the RAM write
// enables and the input/output strobes. A RAM write always stores the MC&KA
// register, i.e. the result of the previous cycle's operation.
//
// The published core generates its control signals "microcode-like" from the
// state; the individual words below are this design's own schedule:
//   load      : set key_in | write key RAM, add pt_in | write state RAM
//   key sched.: set k_j | add S(k_13+..) | (j=0) add RC | write key RAM
//               set k_j | add k_{j-4}'                  | write key RAM
//   MixColumns: set S(a) | add S(a) | add 2*S(a) | add 3*S(a) | add k | write
//   last round: set S(a) | add k | write (ciphertext byte valid)
module aes_microcode
  import aes_pkg::*;
(
  input  ctrl_state_e state,
  input  logic [1:0]  mc,
  output ctrl_word_t  cw
);

  always_comb begin
    cw = CW_NOP;
    unique case (state)
      S_IDLE: ;
      S_LD_KEY: begin
        cw.alu_en = 1'b1;  cw.alu_op = ALU_SET;  cw.alu_src = ALU_SRC_KEY_IN;
        cw.key_rd = 1'b1;
      end
      S_LD_PT: begin
        cw.key_we = 1'b1;
        cw.alu_en = 1'b1;  cw.alu_op = ALU_ADD;  cw.alu_src = ALU_SRC_PT_IN;
        cw.pt_rd  = 1'b1;
      end
      S_LD_WR:  cw.state_we = 1'b1;
      S_KS_SET: begin
        cw.alu_en = 1'b1;  cw.alu_op = ALU_SET;  cw.alu_src = ALU_SRC_KEY_RAM;
      end
      S_KS_SBOX: begin
        cw.alu_en = 1'b1;  cw.alu_op = ALU_ADD;  cw.alu_src = ALU_SRC_SBOX;
        cw.sbox_src = SBOX_SRC_KEY;
      end
      S_KS_RC, S_KS_XOR, S_MC_KEY, S_LR_KEY: begin
        cw.alu_en = 1'b1;  cw.alu_op = ALU_ADD;  cw.alu_src = ALU_SRC_KEY_RAM;
      end
      S_KS_WR:  cw.key_we = 1'b1;
      S_MC_IN: begin
        cw.alu_en = 1'b1;  cw.alu_op = alu_op_e'(mc);  cw.alu_src = ALU_SRC_SBOX;
        cw.sbox_src = SBOX_SRC_STATE;
      end
      S_MC_WR:  cw.state_we = 1'b1;
      S_LR_SUB: begin
        cw.alu_en = 1'b1;  cw.alu_op = ALU_SET;  cw.alu_src = ALU_SRC_SBOX;
        cw.sbox_src = SBOX_SRC_STATE;
      end
      S_LR_WR: begin
        cw.state_we = 1'b1;
        cw.ct_valid = 1'b1;
      end
      default: ;
    endcase
  end

endmodule
