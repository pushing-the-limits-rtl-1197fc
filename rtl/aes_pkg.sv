// aes_pkg: types, constants and GF(2^8) helper functions shared by the
// byte-serial AES-128 encryption core.
//
// The core moves one byte per clock through a single 8-bit datapath. The
// enums below name the selections of its two multiplexers and the four
// operations of the MixColumns/KeyAdd (MC&KA) accumulator; ctrl_word_t is the
// control word the microcode decoder drives each cycle; ctrl_state_e lists
// the controller states. The ALU operation encoding (00 set, 01 add, 10 add
// two times, 11 add three times) follows the published architecture; the
// other encodings are this design's own.
package aes_pkg;

  localparam int unsigned NUM_ROUNDS  = 10;  // AES-128
  localparam int unsigned RAM_DEPTH   = 32;  // one 32 x 8-bit distributed RAM
  localparam int unsigned RC_BASE     = 16;  // round constants RC[1..10] at 16..25

  // MC&KA accumulator operation, r_i = f(r_{i-1}, x_i)
  typedef enum logic [1:0] {
    ALU_SET  = 2'b00,  // r = x
    ALU_ADD  = 2'b01,  // r = r ^ x
    ALU_ADD2 = 2'b10,  // r = r ^ 02*x
    ALU_ADD3 = 2'b11   // r = r ^ 03*x
  } alu_op_e;

  // S-box input multiplexer
  typedef enum logic {
    SBOX_SRC_STATE = 1'b0,
    SBOX_SRC_KEY   = 1'b1
  } sbox_src_e;

  // MC&KA operand multiplexer
  typedef enum logic [1:0] {
    ALU_SRC_KEY_IN  = 2'd0,  // external key byte
    ALU_SRC_PT_IN   = 2'd1,  // external plaintext byte
    ALU_SRC_SBOX    = 2'd2,  // S-box output
    ALU_SRC_KEY_RAM = 2'd3   // round-key RAM output (key addition)
  } alu_src_e;

  // Controller states. LD_*: key/plaintext load with key whitening,
  // KS_*: one key-schedule step, MC_*: round with MixColumns, LR_*: last round.
  typedef enum logic [3:0] {
    S_IDLE    = 4'd0,
    S_LD_KEY  = 4'd1,
    S_LD_PT   = 4'd2,
    S_LD_WR   = 4'd3,
    S_KS_SET  = 4'd4,
    S_KS_SBOX = 4'd5,
    S_KS_RC   = 4'd6,
    S_KS_XOR  = 4'd7,
    S_KS_WR   = 4'd8,
    S_MC_IN   = 4'd9,
    S_MC_KEY  = 4'd10,
    S_MC_WR   = 4'd11,
    S_LR_SUB  = 4'd12,
    S_LR_KEY  = 4'd13,
    S_LR_WR   = 4'd14
  } ctrl_state_e;

  typedef struct packed {
    alu_op_e   alu_op;
    logic      alu_en;
    alu_src_e  alu_src;
    sbox_src_e sbox_src;
    logic      state_we;
    logic      key_we;
    logic      key_rd;    // external key byte consumed
    logic      pt_rd;     // external plaintext byte consumed
    logic      ct_valid;  // ciphertext byte present in the accumulator
  } ctrl_word_t;

  localparam ctrl_word_t CW_NOP = '{alu_op: ALU_SET, alu_en: 1'b0, alu_src: ALU_SRC_KEY_RAM,
                                    sbox_src: SBOX_SRC_STATE, default: 1'b0};

  // ---------------------------------------------------------------- GF(2^8)
  // Field polynomial x^8 + x^4 + x^3 + x + 1.
  function automatic logic [7:0] gf_xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] gf_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p = '0;
    logic [7:0] t = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= t;
      t = gf_xtime(t);
    end
    return p;
  endfunction

  // Multiplicative inverse as a^254 (0 maps to 0).
  function automatic logic [7:0] gf_inv(input logic [7:0] a);
    logic [7:0] res = 8'h01;
    logic [7:0] sq  = a;
    for (int i = 0; i < 8; i++) begin
      if (i != 0) res = gf_mul(res, sq);   // 254 = 0b1111_1110
      sq = gf_mul(sq, sq);
    end
    return res;
  endfunction

  // AES S-box: inverse followed by the affine map with constant 0x63.
  function automatic logic [7:0] sbox_calc(input logic [7:0] a);
    logic [7:0] v = gf_inv(a);
    logic [7:0] s;
    for (int i = 0; i < 8; i++)
      s[i] = v[i] ^ v[(i+4)%8] ^ v[(i+5)%8] ^ v[(i+6)%8] ^ v[(i+7)%8];
    return s ^ 8'h63;
  endfunction

  typedef logic [255:0][7:0] sbox_table_t;

  function automatic sbox_table_t sbox_table();
    sbox_table_t t;
    for (int i = 0; i < 256; i++) t[i] = sbox_calc(8'(i));
    return t;
  endfunction

  // Round constant RC[i] = x^(i-1) in GF(2^8), i >= 1.
  function automatic logic [7:0] round_const(input int unsigned i);
    logic [7:0] rc = 8'h01;
    for (int unsigned k = 1; k < i; k++) rc = gf_xtime(rc);
    return rc;
  endfunction

endpackage
