// weight_buffer: on-chip store of the compressed, non-zero weights of a PE.
//
// Each row holds F_NUM weight records (value plus kernel position kx, ky and
// output channel k), so one row is exactly what the multiplier array consumes
// in one cycle. The values and their indices are kept as two arrays, as the
// PE drawing separates the weight buffer from the weight indices. Rows are
// written from the DRAM side one per cycle and read by the PE controller with
// one cycle of latency (synchronous read, single read port, single write
// port).
//
// The depth is this design's choice; the document gives no buffer sizes.
module weight_buffer
  import sparse_stereo_pkg::*;
#(
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic        clk,
  // write side (from DRAM)
  input  logic        we,
  input  logic [AW-1:0] waddr,
  input  weight_row_t wdata,
  // read side (PE controller)
  input  logic        re,
  input  logic [AW-1:0] raddr,
  output weight_row_t rdata
);
  localparam int unsigned IDX_W = 1 + 2 * KPOS_W + KCH_W;   // valid, kx, ky, k

  logic signed [DATA_W-1:0] val_mem [DEPTH][F_NUM];
  logic [IDX_W-1:0]         idx_mem [DEPTH][F_NUM];

  always_ff @(posedge clk) begin
    if (we) begin
      for (int f = 0; f < F_NUM; f++) begin
        val_mem[waddr][f] <= wdata[f].value;
        idx_mem[waddr][f] <= {wdata[f].valid, wdata[f].kx, wdata[f].ky, wdata[f].k};
      end
    end
    if (re) begin
      for (int f = 0; f < F_NUM; f++) begin
        rdata[f].value <= val_mem[raddr][f];
        {rdata[f].valid, rdata[f].kx, rdata[f].ky, rdata[f].k} <= idx_mem[raddr][f];
      end
    end
  end
endmodule
