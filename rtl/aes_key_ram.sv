// aes_key_ram: round-key memory of the AES core, 32 words of 8 bits.
//
// The same single-address distributed RAM as the state memory (asynchronous
// read, write at the rising edge when we=1). Words 0..15 hold the current
// round key k_0..k_15, updated in place byte by byte by the key schedule.
// Following the published idea of using the spare half of the key memory for
// the round constants, words 16..25 hold RC[1..10] (01, 02, 04, ... 1b, 36)
// as initial contents, as an FPGA bitstream would load them; the core never
// writes them. Words 26..31 are unused and initialised to zero. The exact
// placement of the constants is this design's choice.
module aes_key_ram
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

  typedef logic [DEPTH-1:0][WIDTH-1:0] image_t;

  function automatic image_t init_image();
    image_t img = '0;
    for (int unsigned i = 1; i <= NUM_ROUNDS; i++)
      if (RC_BASE + i - 1 < DEPTH) img[RC_BASE+i-1] = WIDTH'(round_const(i));
    return img;
  endfunction

  localparam image_t INIT = init_image();

  logic [WIDTH-1:0] mem [DEPTH];

  // Power-up contents (the RAM's configuration image)
  initial begin
    for (int unsigned i = 0; i < DEPTH; i++) mem[i] = INIT[i];
  end

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];

endmodule
