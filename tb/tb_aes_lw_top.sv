// tb_aes_lw_top: end-to-end test of the byte-serial AES-128 core at its
// default configuration.
//
// A host model serves key and plaintext bytes by index from two 16-byte
// buffers and collects the ciphertext bytes. It encrypts the two FIPS-197
// example blocks (appendix B and C.1) and a series of random key/plaintext
// pairs, some started back to back, and compares every block with the
// reference model. It checks the latency (1450 cycles from the first load
// cycle to done) and counts how often each mechanism of the core ran: key
// and plaintext loading with key whitening, the shared S-box used by the key
// schedule, round-constant additions, the four accumulator operations of
// MixColumns, key additions, the final round without MixColumns, ciphertext
// output, a reset that aborts an encryption and a start held high across
// two blocks. A mechanism that never ran counts as a failure.
module tb_aes_lw_top;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  localparam int N_RANDOM = 100;

  logic clk = 0, rst = 1, start = 0;
  logic [7:0] key_i, pt_i, ct_o;
  logic [3:0] in_idx, ct_idx;
  logic key_rd, pt_rd, ct_valid, busy, done;

  block_t key_buf, pt_buf, ct_buf;
  int checks = 0, failures = 0;
  int n_key_rd = 0, n_pt_rd = 0, n_ct = 0, n_sbox_key = 0, n_rc = 0, n_key_add = 0;
  int n_op [4] = '{0, 0, 0, 0};
  int n_last_round = 0, n_state_wr = 0, n_key_wr = 0;
  int cyc = 0, t_start = 0;
  int n_aborted = 0, n_back_to_back = 0;
  logic [15:0] ct_seen;

  aes_lw_top dut (.clk, .rst, .start, .key_i, .pt_i, .in_idx, .key_rd, .pt_rd,
                  .ct_o, .ct_valid, .ct_idx, .busy, .done);

  always #5 clk = ~clk;

  assign key_i = key_buf[in_idx];
  assign pt_i  = pt_buf[in_idx];

  // Mechanism counters, observed on the datapath controls
  always @(posedge clk) if (!rst) begin
    cyc++;
    if (key_rd) n_key_rd++;
    if (pt_rd)  n_pt_rd++;
    if (dut.cw.alu_en && dut.cw.alu_src == ALU_SRC_SBOX && dut.cw.sbox_src == SBOX_SRC_KEY)
      n_sbox_key++;
    if (dut.cw.alu_en && dut.cw.alu_src == ALU_SRC_KEY_RAM && dut.key_addr >= 5'(RC_BASE))
      n_rc++;
    if (dut.cw.alu_en && dut.cw.alu_src == ALU_SRC_KEY_RAM && dut.cw.alu_op == ALU_ADD &&
        dut.state inside {S_MC_KEY, S_LR_KEY})
      n_key_add++;
    if (dut.cw.alu_en && dut.cw.alu_src == ALU_SRC_SBOX && dut.cw.sbox_src == SBOX_SRC_STATE)
      n_op[dut.cw.alu_op]++;
    if (dut.state == S_LR_SUB) n_last_round++;
    if (dut.cw.state_we) n_state_wr++;
    if (dut.cw.key_we) n_key_wr++;
    if (ct_valid) begin
      n_ct++;
      ct_buf[ct_idx] = ct_o;
      ct_seen[ct_idx] = 1'b1;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic encrypt(input block_t k, input block_t p, input string name);
    block_t exp;
    int lat;
    key_buf = k; pt_buf = p; ct_seen = '0;
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL %s: core busy before start", name); end
    start = 1;
    @(negedge clk);
    start = 0;
    t_start = cyc;
    while (!done) @(negedge clk);
    lat = cyc - t_start + 1;
    @(negedge clk);
    exp = aes128_encrypt(k, p);
    checks++;
    if (lat != 1450) begin
      failures++;
      $display("FAIL %s: latency %0d cycles, expected 1450", name, lat);
    end
    checks++;
    if (ct_seen != 16'hffff) begin
      failures++;
      $display("FAIL %s: ciphertext bytes seen %b", name, ct_seen);
    end
    checks++;
    if (ct_buf != exp) begin
      failures++;
      $display("FAIL %s: got %p expected %p", name, ct_buf, exp);
    end
  endtask

  task automatic expect_hex(input logic [127:0] ct_hex, input string name);
    checks++;
    if (ct_buf != from_hex(ct_hex)) begin
      failures++;
      $display("FAIL %s: known-answer mismatch", name);
    end
  endtask

  task automatic mechanism(input string what, input int count);
    checks++;
    $display("mechanism %-34s ran %0d times", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism %s never ran", what);
    end
  endtask

  initial begin
    block_t k, p;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;

    encrypt(from_hex(128'h2b7e151628aed2a6abf7158809cf4f3c),
            from_hex(128'h3243f6a8885a308d313198a2e0370734), "FIPS-197 B");
    expect_hex(128'h3925841d02dc09fbdc118597196a0b32, "FIPS-197 B");
    encrypt(from_hex(128'h000102030405060708090a0b0c0d0e0f),
            from_hex(128'h00112233445566778899aabbccddeeff), "FIPS-197 C.1");
    expect_hex(128'h69c4e0d86a7b0430d8cdb78070b4c55a, "FIPS-197 C.1");
    for (int n = 0; n < N_RANDOM; n++) begin
      foreach (k[i]) k[i] = 8'($urandom);
      foreach (p[i]) p[i] = 8'($urandom);
      encrypt(k, p, $sformatf("random %0d", n));
    end

    // reset in the middle of an encryption, then a clean encryption
    key_buf = k; pt_buf = p;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    repeat (600) @(negedge clk);
    rst = 1;
    @(negedge clk) rst = 0;
    checks++;
    if (busy || ct_valid) begin failures++; $display("FAIL reset did not abort"); end
    n_aborted++;
    encrypt(from_hex(128'h000102030405060708090a0b0c0d0e0f),
            from_hex(128'h00112233445566778899aabbccddeeff), "after reset");
    expect_hex(128'h69c4e0d86a7b0430d8cdb78070b4c55a, "after reset");

    // start held high: the core restarts right after done
    key_buf = from_hex(128'h2b7e151628aed2a6abf7158809cf4f3c);
    pt_buf  = from_hex(128'h3243f6a8885a308d313198a2e0370734);
    @(negedge clk) start = 1;
    for (int n = 0; n < 2; n++) begin
      ct_seen = '0;
      while (!done) @(negedge clk);
      @(negedge clk);                    // last byte captured, core back in IDLE
      checks++;
      if (ct_seen != 16'hffff ||
          ct_buf != from_hex(128'h3925841d02dc09fbdc118597196a0b32)) begin
        failures++;
        $display("FAIL back-to-back block %0d", n);
      end
      @(negedge clk);
      checks++;
      if (!busy) begin failures++; $display("FAIL start held high did not restart"); end
      else if (n == 0) n_back_to_back++;
    end
    start = 0;
    while (busy) @(negedge clk);

    mechanism("reset during an encryption", n_aborted);
    mechanism("back-to-back start", n_back_to_back);
    mechanism("key byte load", n_key_rd);
    mechanism("plaintext byte load + whitening", n_pt_rd);
    mechanism("S-box shared by key schedule", n_sbox_key);
    mechanism("round constant addition", n_rc);
    mechanism("MixColumns set", n_op[ALU_SET]);
    mechanism("MixColumns add", n_op[ALU_ADD]);
    mechanism("MixColumns add two times", n_op[ALU_ADD2]);
    mechanism("MixColumns add three times", n_op[ALU_ADD3]);
    mechanism("AddRoundKey merged into MC&KA", n_key_add);
    mechanism("final round without MixColumns", n_last_round);
    mechanism("round key RAM write", n_key_wr);
    mechanism("state RAM write", n_state_wr);
    mechanism("ciphertext byte out", n_ct);
    checks++;
    if (n_rc < 10 * (N_RANDOM + 3)) begin
      failures++;
      $display("FAIL round constants used %0d times", n_rc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
