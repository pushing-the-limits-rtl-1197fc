// aes_alu_in_mux: selects the operand of the MC&KA accumulator among the
// external key byte, the external plaintext byte, the S-box output and the
// key RAM output (used directly for key additions and key-schedule XORs).
// Combinational; the select comes from the microcode. The four inputs are
// those of the published datapath, the select encoding is this design's own.
module aes_alu_in_mux
  import aes_pkg::*;
(
  input  alu_src_e   sel,
  input  logic [7:0] key_in,
  input  logic [7:0] pt_in,
  input  logic [7:0] sbox_d,
  input  logic [7:0] key_ram_d,
  output logic [7:0] y
);

  always_comb begin
    unique case (sel)
      ALU_SRC_KEY_IN:  y = key_in;
      ALU_SRC_PT_IN:   y = pt_in;
      ALU_SRC_SBOX:    y = sbox_d;
      ALU_SRC_KEY_RAM: y = key_ram_d;
      default:         y = key_ram_d;
    endcase
  end

endmodule
