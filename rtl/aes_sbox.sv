// aes_sbox: the AES S-box (SubBytes) as a 256-entry look-up table.
//
// Purely combinational: y = S(x). The published core builds the S-box from
// LUTs and shares this single instance between the round function and the
// key schedule. The table is filled at elaboration from the S-box
// definition, S(x) = A * x^-1 + 0x63 in GF(2^8) with x^8+x^4+x^3+x+1
// (see aes_pkg::sbox_calc), so no constants are listed here; a synthesis
// tool reduces it to a ROM / LUT network. The published core spends 8 slices
// on it, which matches one 256 x 1-bit LUT memory per output bit.
module aes_sbox
  import aes_pkg::*;
(
  input  logic [7:0] x,
  output logic [7:0] y
);

  localparam sbox_table_t TABLE = sbox_table();

  assign y = TABLE[x];

endmodule
