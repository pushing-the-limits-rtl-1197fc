// tb_aes_sbox_in_mux: random data on both inputs, both selects.
module tb_aes_sbox_in_mux;
  import aes_pkg::*;
  sbox_src_e sel = SBOX_SRC_STATE;
  logic [7:0] state_d = '0, key_d = '0, y;
  int checks = 0, failures = 0;

  aes_sbox_in_mux dut (.sel, .state_d, .key_d, .y);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      sel = sbox_src_e'(i % 2);
      state_d = 8'($urandom); key_d = 8'($urandom);
      #1;
      checks++;
      if (y !== ((i % 2) ? key_d : state_d)) begin
        failures++;
        $display("FAIL sel=%0d y=%02h", sel, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
