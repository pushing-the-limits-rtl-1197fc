// tb_aes_ctrl: runs the controller through two encryptions and checks the
// length of an encryption (1450 cycles from the first load cycle to done),
// how often each state is visited, the order of the round constants taken
// (rounds 1..10), the MixColumns counter order, the byte order of the
// ciphertext strobes, that start is ignored while busy, and reset.
module tb_aes_ctrl;
  import aes_pkg::*;

  logic clk = 0, rst = 1, start = 0;
  ctrl_state_e state;
  logic [3:0] round, byte_idx;
  logic [1:0] mc;
  logic busy, done;
  int checks = 0, failures = 0;
  int visits [16];
  int cycles, rc_next, ct_next;
  logic [1:0] mc_next;

  aes_ctrl dut (.clk, .rst, .start, .state, .round, .byte_idx, .mc, .busy, .done);

  always #5 clk = ~clk;

  task automatic expect_int(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one();
    foreach (visits[i]) visits[i] = 0;
    cycles = 0; rc_next = 1; ct_next = 0; mc_next = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    expect_int("busy after start", int'(busy), 1);
    while (1) begin
      visits[state]++;
      cycles++;
      if (state == S_KS_RC) begin
        expect_int("round at RC step", int'(round), rc_next);
        rc_next++;
      end
      if (state == S_MC_IN) begin
        expect_int("MixColumns counter", int'(mc), int'(mc_next));
        mc_next++;
      end
      if (state == S_LR_WR) begin
        expect_int("ciphertext byte order", int'(byte_idx), ct_next);
        ct_next++;
      end
      if (cycles == 700) start = 1;       // must be ignored while busy
      if (cycles == 701) start = 0;
      if (done) break;
      @(negedge clk);
    end
    expect_int("cycles per encryption", cycles, 1450);
    expect_int("LD_KEY",  visits[S_LD_KEY], 16);
    expect_int("LD_PT",   visits[S_LD_PT], 16);
    expect_int("LD_WR",   visits[S_LD_WR], 16);
    expect_int("KS_SET",  visits[S_KS_SET], 160);
    expect_int("KS_SBOX", visits[S_KS_SBOX], 40);
    expect_int("KS_RC",   visits[S_KS_RC], 10);
    expect_int("KS_XOR",  visits[S_KS_XOR], 120);
    expect_int("KS_WR",   visits[S_KS_WR], 160);
    expect_int("MC_IN",   visits[S_MC_IN], 9 * 16 * 4);
    expect_int("MC_KEY",  visits[S_MC_KEY], 9 * 16);
    expect_int("MC_WR",   visits[S_MC_WR], 9 * 16);
    expect_int("LR_SUB",  visits[S_LR_SUB], 16);
    expect_int("LR_KEY",  visits[S_LR_KEY], 16);
    expect_int("LR_WR",   visits[S_LR_WR], 16);
    @(negedge clk);
    expect_int("idle after done", int'(busy), 0);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    expect_int("idle after reset", int'(state), int'(S_IDLE));
    run_one();
    repeat (5) @(negedge clk);
    expect_int("stays idle", int'(busy), 0);
    run_one();
    // reset in the middle of an encryption
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    repeat (100) @(negedge clk);
    rst = 1;
    @(negedge clk); rst = 0;
    expect_int("reset aborts", int'(busy), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
