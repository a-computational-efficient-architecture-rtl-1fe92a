// chess_map: block-based chess mapping of one output pixel onto the
// accumulator banks.
//
// An output tile of TILE_W x TILE_H pixels and KC output channels is cut into
// 8 x 4 blocks. Every pixel of a block owns one of the 32 banks:
// the left 4 x 4 half uses banks 0..15 and the right half banks 16..31, row by
// row (bank = 16*x[2] + 4*y[1:0] + x[1:0]). Inside a bank the word address
// selects the block and the channel: addr = k*BLOCKS + (y/4)*(TILE_W/8) + x/8.
// The pixel's checkerboard group is 2*y[0] + x[0] (groups 1..4 of the mapping
// are numbered 0..3 here). Purely combinational.
//
// The bank numbering inside a block and the four groups follow the published
// mapping; the address order (channel-major, then block rows) is this
// design's own choice.
module chess_map
  import sparse_stereo_pkg::*;
#(
  parameter int unsigned TILE_W = 16,
  parameter int unsigned TILE_H = 16,
  parameter int unsigned KC     = 16,
  localparam int unsigned BLOCKS = (TILE_W / BLK_W) * (TILE_H / BLK_H),
  localparam int unsigned ADDR_W = $clog2(KC * BLOCKS)
) (
  input  logic [COORD_W-1:0] x,
  input  logic [COORD_W-1:0] y,
  input  logic [KCH_W-1:0]   k,
  output logic [BANK_W-1:0]  bank,
  output logic [ADDR_W-1:0]  addr,
  output logic [GRP_W-1:0]   group
);
  localparam int unsigned BX = TILE_W / BLK_W;   // blocks per tile row

  always_comb begin
    bank  = {x[2], y[1:0], x[1:0]};
    addr  = ADDR_W'(32'(k) * BLOCKS + (32'(y) / BLK_H) * BX + 32'(x) / BLK_W);
    group = {y[0], x[0]};
  end
endmodule
