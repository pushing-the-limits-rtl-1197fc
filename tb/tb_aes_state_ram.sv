// tb_aes_state_ram: writes random data to every word of the 32 x 8 state
// RAM, then performs random reads and writes, comparing the asynchronous
// read port with a shadow array; also checks that we=0 leaves words alone
// and that a read in the cycle of a write returns the old word.
module tb_aes_state_ram;
  logic clk = 0, we = 0;
  logic [4:0] addr = '0;
  logic [7:0] wdata = '0, rdata;
  logic [7:0] shadow [32];
  int checks = 0, failures = 0;

  aes_state_ram dut (.clk, .we, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  task automatic check_read(input logic [4:0] a);
    we = 0; addr = a;
    #1;
    checks++;
    if (rdata !== shadow[a]) begin
      failures++;
      $display("FAIL read [%0d] = %02h expected %02h", a, rdata, shadow[a]);
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
    for (int a = 0; a < 32; a++) begin
      @(negedge clk);
      we = 1; addr = 5'(a); wdata = 8'($urandom); shadow[a] = wdata;
    end
    @(negedge clk);
    for (int a = 0; a < 32; a++) check_read(5'(a));
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      addr = 5'($urandom); wdata = 8'($urandom); we = 1'($urandom);
      #1;
      checks++;   // asynchronous read shows the old word before the edge
      if (rdata !== shadow[addr]) begin
        failures++;
        $display("FAIL pre-write read [%0d] = %02h expected %02h", addr, rdata, shadow[addr]);
      end
      @(posedge clk);
      if (we) shadow[addr] = wdata;
      #1;
      check_read(addr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
