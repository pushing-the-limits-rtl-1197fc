// tb_aes_sbox: checks the S-box look-up table on all 256 inputs against the
// reference model (inverse found by search, affine map by rotations) and on
// a few published FIPS-197 values.
module tb_aes_sbox;
  import aes_ref_pkg::*;

  logic [7:0] x, y;
  int checks = 0, failures = 0;

  aes_sbox dut (.x, .y);

  task automatic check(input logic [7:0] in, input logic [7:0] exp);
    x = in;
    #1;
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL S(%02h) = %02h, expected %02h", in, y, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(8'h00, 8'h63);
    check(8'h01, 8'h7c);
    check(8'h53, 8'hed);
    check(8'hff, 8'h16);
    check(8'h19, 8'hd4);
    for (int i = 0; i < 256; i++) check(8'(i), ref_sbox(8'(i)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
