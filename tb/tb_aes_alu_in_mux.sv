// tb_aes_alu_in_mux: random data on all four inputs, every select.
module tb_aes_alu_in_mux;
  import aes_pkg::*;
  alu_src_e sel = ALU_SRC_KEY_IN;
  logic [7:0] key_in = '0, pt_in = '0, sbox_d = '0, key_ram_d = '0, y, exp;
  int checks = 0, failures = 0;

  aes_alu_in_mux dut (.sel, .key_in, .pt_in, .sbox_d, .key_ram_d, .y);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      sel = alu_src_e'(i % 4);
      key_in = 8'($urandom); pt_in = 8'($urandom);
      sbox_d = 8'($urandom); key_ram_d = 8'($urandom);
      case (i % 4)
        0: exp = key_in;
        1: exp = pt_in;
        2: exp = sbox_d;
        default: exp = key_ram_d;
      endcase
      #1;
      checks++;
      if (y !== exp) begin
        failures++;
        $display("FAIL sel=%0d y=%02h expected %02h", i % 4, y, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
