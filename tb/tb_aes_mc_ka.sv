// tb_aes_mc_ka: drives the MC&KA accumulator with random operations and
// operands and compares against a model written with the reference GF(2^8)
// multiplier; also accumulates the FIPS-197 MixColumns example column
// (db 13 53 45 -> 8e 4d a1 bc) plus a key byte, and checks hold and reset.
module tb_aes_mc_ka;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 0, rst = 1, en = 0;
  alu_op_e op = ALU_SET;
  logic [7:0] x = '0, r, model = '0;
  int checks = 0, failures = 0;

  aes_mc_ka dut (.clk, .rst, .en, .op, .x, .r);

  always #5 clk = ~clk;

  task automatic step(input logic e, input alu_op_e o, input logic [7:0] d);
    en = e; op = o; x = d;
    @(posedge clk);
    if (e) begin
      unique case (o)
        ALU_SET:  model = d;
        ALU_ADD:  model ^= d;
        ALU_ADD2: model ^= ref_mul(8'h02, d);
        ALU_ADD3: model ^= ref_mul(8'h03, d);
      endcase
    end
    #1;
    checks++;
    if (r !== model) begin
      failures++;
      $display("FAIL op=%s x=%02h r=%02h expected %02h", o.name(), d, r, model);
    end
  endtask

  // one MixColumns output byte: coefficients for row 'row', plus key k
  task automatic mc_byte(input logic [7:0] col [4], input int row, input logic [7:0] k,
                         input logic [7:0] exp);
    for (int m = 0; m < 4; m++) step(1'b1, alu_op_e'(m), col[(row + 2 + m) % 4]);
    step(1'b1, ALU_ADD, k);
    checks++;
    if (r !== exp) begin
      failures++;
      $display("FAIL MixColumns row %0d: %02h expected %02h", row, r, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] col [4] = '{8'hdb, 8'h13, 8'h53, 8'h45};
    logic [7:0] res [4] = '{8'h8e, 8'h4d, 8'ha1, 8'hbc};
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (r !== 8'h00) begin failures++; $display("FAIL reset value %02h", r); end
    rst = 0;
    for (int i = 0; i < 2000; i++)
      step($urandom_range(0, 3) != 0, alu_op_e'($urandom_range(0, 3)), 8'($urandom));
    for (int row = 0; row < 4; row++) mc_byte(col, row, 8'h5a, res[row] ^ 8'h5a);
    rst = 1;
    @(posedge clk);
    #1;
    model = '0;
    checks++;
    if (r !== 8'h00) begin failures++; $display("FAIL synchronous reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
