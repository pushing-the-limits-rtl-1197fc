// aes_state_ram: round-state memory of the AES core, 32 words of 8 bits.
//
// Modelled on a 32 x 8-bit distributed (LUT) RAM, as used in the published
// design instead of 128 state flip-flops. All four LUT ports of such a RAM
// share one address when used 8 bits wide, so the model has a single address
// for reading and writing: reads are asynchronous (rdata follows addr in the
// same cycle), a write takes effect at the rising clock edge when we=1.
//
// The core uses the 32 words as two 16-byte halves: one holds the input of
// the current round and is read, the other receives the round's output. The
// halves swap every round (this split is this design's choice). The contents
// are not reset; every word is written before it is read.
module aes_state_ram
  import aes_pkg::*;
#(
  parameter int unsigned DEPTH = RAM_DEPTH,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];

endmodule
