// aes_addr_gen: address generation for the two RAMs of the AES core.
//
// Combinational, from the controller state and its counters. Byte k of the
// 16-byte state or key is row k[1:0], column k[3:2] (AES column-major order).
// The state RAM is split into two halves: a round reads half ~round[0] and
// writes half round[0]; the load phase (round 0) writes half 0.
//
//  * ShiftRows is done purely by addressing: output byte (r,c) takes the
//    byte of row r from column (c + r) mod 4, which rotates row r left by r.
//  * MixColumns: output byte (r,c) is accumulated from the four bytes of its
//    shifted column in the order rows r+2, r+3, r, r+1 (mod 4), selected by
//    the 2-bit counter mc; coefficients 1,1,2,3 match that order.
//  * Key schedule: byte j (j<4) reads k_{12 + (j+1) mod 4} for the S-box
//    (k13, k14, k15, k12, the rotated last word), bytes j>=4 read the already
//    updated k_{j-4}; the round constant of round i sits at RC_BASE+i-1.
// The use of addressing for ShiftRows follows the published design; the
// memory layout and the MixColumns input order are this design's own.
module aes_addr_gen
  import aes_pkg::*;
(
  input  ctrl_state_e state,
  input  logic [3:0]  round,
  input  logic [3:0]  byte_idx,
  input  logic [1:0]  mc,
  output logic [4:0]  state_addr,
  output logic [4:0]  key_addr
);

  logic [1:0] row, col, src_row, src_col;

  assign row = byte_idx[1:0];
  assign col = byte_idx[3:2];

  // Row of the state byte read in this cycle
  always_comb begin
    if (state == S_MC_IN) src_row = row + 2'd2 + mc;
    else                  src_row = row;
  end

  // ShiftRows: row src_row is rotated left by src_row
  assign src_col = col + src_row;

  always_comb begin
    unique case (state)
      S_MC_IN, S_LR_SUB: state_addr = {~round[0], src_col, src_row};
      default:           state_addr = {round[0], byte_idx};
    endcase
  end

  always_comb begin
    unique case (state)
      S_KS_SBOX: key_addr = {3'b011, row + 2'd1};
      S_KS_RC:   key_addr = 5'(RC_BASE) + {1'b0, round} - 5'd1;
      S_KS_XOR:  key_addr = {1'b0, byte_idx - 4'd4};
      default:   key_addr = {1'b0, byte_idx};
    endcase
  end

endmodule
