// group_buffer: compressed input activations of one PE's tile.
//
// Every word is one vector of I_NUM non-zero activations that all belong to
// the same checkerboard group, tagged with that group, as the chess mapping
// fetches them: stride-2 convolutions keep the four groups apart, unit-stride
// convolutions merge the diagonal groups so that only two kinds of vectors
// occur. The order of the vectors is decided when the tile is written and is
// kept as is. One write port (DRAM side) and one synchronous read port (PE
// side, one cycle latency).
//
// The depth is this design's choice; the document gives no buffer sizes.
module group_buffer
  import sparse_stereo_pkg::*;
#(
  parameter int unsigned DEPTH = 512,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  act_vec_t      wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output act_vec_t      rdata
);
  act_vec_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
