// tb_aes_key_ram: checks the power-up contents of the key RAM (round
// constants RC[1..10] = 01 02 04 08 10 20 40 80 1b 36 at words 16..25, zero
// at 26..31), then random writes and reads against a shadow array.
module tb_aes_key_ram;
  logic clk = 0, we = 0;
  logic [4:0] addr = '0;
  logic [7:0] wdata = '0, rdata;
  logic [7:0] shadow [32];
  logic [7:0] rc [10] = '{8'h01, 8'h02, 8'h04, 8'h08, 8'h10, 8'h20, 8'h40, 8'h80, 8'h1b, 8'h36};
  int checks = 0, failures = 0;

  aes_key_ram dut (.clk, .we, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  task automatic check_read(input logic [4:0] a, input logic [7:0] exp);
    we = 0; addr = a;
    #1;
    checks++;
    if (rdata !== exp) begin
      failures++;
      $display("FAIL read [%0d] = %02h expected %02h", a, rdata, exp);
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
    #1;
    for (int i = 0; i < 10; i++) check_read(5'(16 + i), rc[i]);
    for (int i = 26; i < 32; i++) check_read(5'(i), 8'h00);
    for (int a = 0; a < 32; a++) begin
      @(negedge clk);
      we = 1; addr = 5'(a); wdata = 8'($urandom); shadow[a] = wdata;
    end
    @(negedge clk);
    for (int a = 0; a < 32; a++) check_read(5'(a), shadow[a]);
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      addr = 5'($urandom); wdata = 8'($urandom); we = 1'($urandom);
      @(posedge clk);
      if (we) shadow[addr] = wdata;
      #1;
      check_read(addr, shadow[addr]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
