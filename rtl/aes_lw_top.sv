// aes_lw_top: byte-serial AES-128 encryption core with on-the-fly key
// expansion, sized for a handful of FPGA slices.
//
// Datapath (one byte wide): the round state and the round key live in two
// 32 x 8-bit distributed RAMs; a multiplexer feeds either RAM's output to the
// single shared S-box; a second multiplexer picks the operand of the MC&KA
// accumulator among the key input, the plaintext input, the S-box output and
// the key RAM output; the accumulator (set / add / add 2x / add 3x) does
// MixColumns, AddRoundKey and the key-schedule XORs, and its register feeds
// both RAM write ports and the ciphertext output. aes_ctrl, aes_microcode and
// aes_addr_gen sequence everything; ShiftRows exists only as address
// arithmetic. This structure follows the published architecture.
//
// Host interface (this design's own): after start (sampled while busy=0) the
// core asks for the key and plaintext bytes by index. In a cycle with key_rd=1
// it takes key_i as key byte in_idx, with pt_rd=1 it takes pt_i as plaintext
// byte in_idx; the host drives them combinationally from in_idx (e.g. from a
// 16-byte buffer). Byte k is state row k%4, column k/4 (FIPS-197 order). The
// ciphertext leaves byte by byte: ct_valid=1 marks ct_o as ciphertext byte
// ct_idx, done pulses with byte 15. Latency: 1450 cycles from the first load
// cycle (the cycle after start) to the last ciphertext byte; a new start is
// accepted one cycle later.
module aes_lw_top
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic [7:0] key_i,
  input  logic [7:0] pt_i,
  output logic [3:0] in_idx,
  output logic       key_rd,
  output logic       pt_rd,
  output logic [7:0] ct_o,
  output logic       ct_valid,
  output logic [3:0] ct_idx,
  output logic       busy,
  output logic       done
);

  ctrl_state_e state;
  logic [3:0]  round, byte_idx;
  logic [1:0]  mc;
  ctrl_word_t  cw;
  logic [4:0]  state_addr, key_addr;
  logic [7:0]  state_q, key_q, sbox_x, sbox_y, alu_x, r;

  aes_ctrl u_ctrl (
    .clk, .rst, .start,
    .state, .round, .byte_idx, .mc, .busy, .done
  );

  aes_microcode u_microcode (.state, .mc, .cw);

  aes_addr_gen u_addr_gen (
    .state, .round, .byte_idx, .mc, .state_addr, .key_addr
  );

  aes_state_ram u_state_ram (
    .clk, .we(cw.state_we), .addr(state_addr), .wdata(r), .rdata(state_q)
  );

  aes_key_ram u_key_ram (
    .clk, .we(cw.key_we), .addr(key_addr), .wdata(r), .rdata(key_q)
  );

  aes_sbox_in_mux u_sbox_in_mux (
    .sel(cw.sbox_src), .state_d(state_q), .key_d(key_q), .y(sbox_x)
  );

  aes_sbox u_sbox (.x(sbox_x), .y(sbox_y));

  aes_alu_in_mux u_alu_in_mux (
    .sel(cw.alu_src), .key_in(key_i), .pt_in(pt_i), .sbox_d(sbox_y),
    .key_ram_d(key_q), .y(alu_x)
  );

  aes_mc_ka u_mc_ka (
    .clk, .rst, .en(cw.alu_en), .op(cw.alu_op), .x(alu_x), .r
  );

  assign in_idx   = byte_idx;
  assign key_rd   = cw.key_rd;
  assign pt_rd    = cw.pt_rd;
  assign ct_o     = r;
  assign ct_valid = cw.ct_valid;
  assign ct_idx   = byte_idx;

  // One RAM is written per cycle, and never together with an external read
  a_one_write: assert property (@(posedge clk) disable iff (rst) !(cw.state_we && cw.key_we));
  a_rd_idle:   assert property (@(posedge clk) disable iff (rst)
                                (cw.key_rd || cw.pt_rd) |-> (round == 4'd0));

endmodule
