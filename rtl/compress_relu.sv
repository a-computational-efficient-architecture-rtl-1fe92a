// compress_relu: ReLU and zero-skipping compression of one output block.
//
// During a drain the 32 banks deliver the 32 pixels of one 8 x 4 block of
// output channel k in one cycle (blk_valid). The unit applies ReLU if enabled,
// saturates each sum to DATA_W bits, and then emits the non-zero pixels as
// compressed vectors of up to I_NUM records (value, x, y, k), one vector per
// cycle, group by group (groups 0..3 of the checkerboard), so that the next
// layer can read them back as group-tagged input vectors. A group with no
// non-zero pixel emits nothing. blk_ready is high when no block is being
// emitted. Output handshake: out_valid / out_ready.
//
// ReLU followed by compression before the output buffer follows the PE
// drawing; saturation without rescaling, the group order and the packing of
// four records per vector are this design's choices.
module compress_relu
  import sparse_stereo_pkg::*;
#(
  parameter int unsigned TILE_W = 16,
  parameter int unsigned TILE_H = 16,
  parameter int unsigned KC     = 16,
  localparam int unsigned BLOCKS = (TILE_W / BLK_W) * (TILE_H / BLK_H),
  localparam int unsigned ADDR_W = $clog2(KC * BLOCKS)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    relu,
  input  logic                    blk_valid,
  output logic                    blk_ready,
  input  logic [ADDR_W-1:0]       blk_addr,
  input  logic signed [ACC_W-1:0] blk_data [N_BANKS],
  output logic                    out_valid,
  input  logic                    out_ready,
  output out_vec_t                out_data
);
  localparam int unsigned BX  = TILE_W / BLK_W;

  localparam logic signed [ACC_W-1:0] VMAX = ACC_W'((1 << (DATA_W - 1)) - 1);
  localparam logic signed [ACC_W-1:0] VMIN = -ACC_W'(1 << (DATA_W - 1));

  logic                     active;
  logic signed [DATA_W-1:0] val  [N_BANKS];
  logic [N_BANKS-1:0]       nz;          // non-zero pixels not yet emitted
  logic [GRP_W-1:0]         grp;
  logic [KCH_W-1:0]         blk_k;
  logic [COORD_W-1:0]       blk_x0, blk_y0;

  // bank -> pixel offset inside the block (inverse of chess_map)
  function automatic logic [2:0] bank_dx(int b);
    return 3'({b[4], b[1:0]});
  endfunction
  function automatic logic [1:0] bank_dy(int b);
    return 2'(b[3:2]);
  endfunction
  function automatic logic [GRP_W-1:0] bank_grp(int b);
    return {b[2], b[0]};
  endfunction

  // up to I_NUM non-zero pixels of the current group
  logic [N_BANKS-1:0] take;
  logic [N_BANKS-1:0] grp_mask;
  always_comb begin
    automatic int n = 0;
    take     = '0;
    grp_mask = '0;
    out_data = '0;
    out_data.group = grp;
    for (int b = 0; b < N_BANKS; b++) begin
      grp_mask[b] = (bank_grp(b) == grp);
      if (nz[b] && grp_mask[b] && n < I_NUM) begin
        take[b] = 1'b1;
        out_data.a[n].valid = 1'b1;
        out_data.a[n].value = val[b];
        out_data.a[n].x     = blk_x0 + COORD_W'(bank_dx(b));
        out_data.a[n].y     = blk_y0 + COORD_W'(bank_dy(b));
        out_data.a[n].k     = blk_k;
        n++;
      end
    end
    out_valid = active && (take != '0);
  end

  assign blk_ready = !active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      nz     <= '0;
      grp    <= '0;
      blk_k  <= '0;
      blk_x0 <= '0;
      blk_y0 <= '0;
      for (int b = 0; b < N_BANKS; b++) val[b] <= '0;
    end else if (!active) begin
      if (blk_valid) begin
        automatic int blk = int'(blk_addr) % BLOCKS;
        active <= 1'b1;
        grp    <= '0;
        blk_k  <= KCH_W'(int'(blk_addr) / BLOCKS);
        blk_x0 <= COORD_W'((blk % BX) * BLK_W);
        blk_y0 <= COORD_W'((blk / BX) * BLK_H);
        for (int b = 0; b < N_BANKS; b++) begin
          automatic logic signed [ACC_W-1:0] v = blk_data[b];
          if (relu && v < 0) v = '0;
          if (v > VMAX) v = VMAX;
          if (v < VMIN) v = VMIN;
          val[b] <= DATA_W'(v);
          nz[b]  <= (v != '0);
        end
      end
    end else begin
      // leave the group when nothing of it is left after this cycle
      automatic logic [N_BANKS-1:0] left;
      left = nz & ~((out_valid && out_ready) ? take : '0);
      if (out_valid && out_ready) nz <= left;
      if ((left & grp_mask) == '0) begin
        if (grp == GRP_W'(N_GROUPS - 1)) active <= 1'b0;
        grp <= grp + 1'b1;
      end
    end
  end
endmodule
