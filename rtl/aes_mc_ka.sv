// aes_mc_ka: MixColumns and key-addition unit, an 8-bit register preceded by
// a four-operation ALU.
//
// On a rising edge with en=1 the register r takes
//   op 00: x            (set)
//   op 01: r ^ x        (add)
//   op 10: r ^ 02*x     (add two times, GF(2^8))
//   op 11: r ^ 03*x     (add three times)
// A MixColumns output byte is accumulated over four cycles, one per column
// byte, and a fifth "add" merges AddRoundKey; the same add serves the XORs of
// the key schedule. The four operations follow the published design. The
// enable (r holds while en=0, so its value can be written to RAM in a later
// cycle) and the synchronous reset to zero are this design's additions.
// r is also the ciphertext output of the core.
module aes_mc_ka
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  input  alu_op_e    op,
  input  logic [7:0] x,
  output logic [7:0] r
);

  logic [7:0] x2, nxt;

  assign x2 = gf_xtime(x);

  always_comb begin
    unique case (op)
      ALU_SET:  nxt = x;
      ALU_ADD:  nxt = r ^ x;
      ALU_ADD2: nxt = r ^ x2;
      ALU_ADD3: nxt = r ^ x2 ^ x;
      default:  nxt = x;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst)     r <= '0;
    else if (en) r <= nxt;
  end

endmodule
