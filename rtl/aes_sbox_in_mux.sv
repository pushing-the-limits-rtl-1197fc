// aes_sbox_in_mux: selects the S-box input, the state RAM output for
// SubBytes or the key RAM output for the key schedule, so that one S-box
// serves both. Combinational; the select comes from the microcode.
module aes_sbox_in_mux
  import aes_pkg::*;
(
  input  sbox_src_e  sel,
  input  logic [7:0] state_d,
  input  logic [7:0] key_d,
  output logic [7:0] y
);

  always_comb begin
    unique case (sel)
      SBOX_SRC_STATE: y = state_d;
      SBOX_SRC_KEY:   y = key_d;
      default:        y = state_d;
    endcase
  end

endmodule
