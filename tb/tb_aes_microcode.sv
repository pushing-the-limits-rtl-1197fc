// tb_aes_microcode: checks the control word of every controller state
// (and every MixColumns counter value) against the intended datapath action
// of that step: operand source, S-box source, ALU operation and enable, the
// single RAM write enable, and the host strobes.
module tb_aes_microcode;
  import aes_pkg::*;

  ctrl_state_e state = S_IDLE;
  logic [1:0] mc = '0;
  ctrl_word_t cw;
  int checks = 0, failures = 0;

  aes_microcode dut (.state, .mc, .cw);

  // expected: en, op, src, sbox_src (only compared when en and src=SBOX),
  //           state_we, key_we, key_rd, pt_rd, ct_valid
  task automatic expect_cw(input ctrl_state_e s, input logic [1:0] m, input logic en,
                           input alu_op_e op, input alu_src_e src, input sbox_src_e ss,
                           input logic swe, input logic kwe, input logic krd,
                           input logic prd, input logic ctv);
    state = s; mc = m; #1;
    checks++;
    if (cw.alu_en !== en || (en && (cw.alu_op !== op || cw.alu_src !== src)) ||
        (en && src == ALU_SRC_SBOX && cw.sbox_src !== ss) ||
        cw.state_we !== swe || cw.key_we !== kwe || cw.key_rd !== krd ||
        cw.pt_rd !== prd || cw.ct_valid !== ctv) begin
      failures++;
      $display("FAIL state %s mc=%0d: cw=%p", s.name(), m, cw);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 4; m++) begin
      logic [1:0] mm = 2'(m);
      expect_cw(S_IDLE,    mm, 0, ALU_SET,  ALU_SRC_KEY_IN,  SBOX_SRC_STATE, 0, 0, 0, 0, 0);
      expect_cw(S_LD_KEY,  mm, 1, ALU_SET,  ALU_SRC_KEY_IN,  SBOX_SRC_STATE, 0, 0, 1, 0, 0);
      expect_cw(S_LD_PT,   mm, 1, ALU_ADD,  ALU_SRC_PT_IN,   SBOX_SRC_STATE, 0, 1, 0, 1, 0);
      expect_cw(S_LD_WR,   mm, 0, ALU_SET,  ALU_SRC_KEY_IN,  SBOX_SRC_STATE, 1, 0, 0, 0, 0);
      expect_cw(S_KS_SET,  mm, 1, ALU_SET,  ALU_SRC_KEY_RAM, SBOX_SRC_KEY,   0, 0, 0, 0, 0);
      expect_cw(S_KS_SBOX, mm, 1, ALU_ADD,  ALU_SRC_SBOX,    SBOX_SRC_KEY,   0, 0, 0, 0, 0);
      expect_cw(S_KS_RC,   mm, 1, ALU_ADD,  ALU_SRC_KEY_RAM, SBOX_SRC_KEY,   0, 0, 0, 0, 0);
      expect_cw(S_KS_XOR,  mm, 1, ALU_ADD,  ALU_SRC_KEY_RAM, SBOX_SRC_KEY,   0, 0, 0, 0, 0);
      expect_cw(S_KS_WR,   mm, 0, ALU_SET,  ALU_SRC_KEY_IN,  SBOX_SRC_STATE, 0, 1, 0, 0, 0);
      expect_cw(S_MC_IN,   mm, 1, alu_op_e'(mm), ALU_SRC_SBOX, SBOX_SRC_STATE, 0, 0, 0, 0, 0);
      expect_cw(S_MC_KEY,  mm, 1, ALU_ADD,  ALU_SRC_KEY_RAM, SBOX_SRC_STATE, 0, 0, 0, 0, 0);
      expect_cw(S_MC_WR,   mm, 0, ALU_SET,  ALU_SRC_KEY_IN,  SBOX_SRC_STATE, 1, 0, 0, 0, 0);
      expect_cw(S_LR_SUB,  mm, 1, ALU_SET,  ALU_SRC_SBOX,    SBOX_SRC_STATE, 0, 0, 0, 0, 0);
      expect_cw(S_LR_KEY,  mm, 1, ALU_ADD,  ALU_SRC_KEY_RAM, SBOX_SRC_STATE, 0, 0, 0, 0, 0);
      expect_cw(S_LR_WR,   mm, 0, ALU_SET,  ALU_SRC_KEY_IN,  SBOX_SRC_STATE, 1, 0, 0, 0, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
