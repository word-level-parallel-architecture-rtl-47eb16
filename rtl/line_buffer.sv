// line_buffer: 12 x 64 register file holding, for every column of the code
// block, the coefficient decoded in the last row of the previous stripe.
// Each 12-bit word is {pass-1 flag, sign, 10-bit magnitude}; the flag tells
// whether the coefficient's first non-zero bit was decoded by pass 1, which
// is all the first row of the next stripe needs to know about that bit's
// pass. Written by the last bit-plane as each column leaves it; read
// (asynchronously) by the first bit-plane as the column below enters it.
//
// Origin: a 12-bit x 64 buffer holding the previous stripe's last row
// (magnitude, sign, first-pass flag) follows the published architecture; the
// register-file form (asynchronous read) is this design's choice.
module line_buffer #(
  parameter int DEPTH = 64,
  parameter int WIDTH = 12
) (
  input  logic                     clk,
  input  logic                     we_i,
  input  logic [$clog2(DEPTH)-1:0] waddr_i,
  input  logic [WIDTH-1:0]         wdata_i,
  input  logic [$clog2(DEPTH)-1:0] raddr_i,
  output logic [WIDTH-1:0]         rdata_o
);
  logic [WIDTH-1:0] mem [DEPTH];
  always_ff @(posedge clk) if (we_i) mem[waddr_i] <= wdata_i;
  assign rdata_o = mem[raddr_i];
endmodule
