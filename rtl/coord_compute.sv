// coord_compute: output coordinates, bank and address of every product.
//
// For each weight/activation pair the output pixel is computed from the
// activation's tile-local position (x, y) and the weight's kernel position
// (kx, ky):
//   unit-stride convolution   xo = x - kx
//   stride-2 convolution      xo = (x - kx) / 2, only if x - kx is even
//   stride-2 deconvolution    xo = 2*x + kx - dc_off
// and likewise for y. Activation coordinates include the halo, so the first
// output of the tile is xo = 0. A pair is kept only when both records are
// valid, the output lies inside the TILE_W x TILE_H tile and k < KC; kept
// pairs are then placed by the block-based chess mapping (chess_map).
// Purely combinational. In stride-2 convolution the parity test is what the
// group-to-group pairing guarantees anyway; it is checked here as well.
//
// The three index equations are this design's reading of strided
// convolution and of deconvolution split into four parity sub-kernels; the
// halo-inclusive tile coordinates and dc_off are its own choices.
module coord_compute
  import sparse_stereo_pkg::*;
#(
  parameter int unsigned TILE_W = 16,
  parameter int unsigned TILE_H = 16,
  parameter int unsigned KC     = 16,
  localparam int unsigned BLOCKS = (TILE_W / BLK_W) * (TILE_H / BLK_H),
  localparam int unsigned ADDR_W = $clog2(KC * BLOCKS)
) (
  input  conv_mode_e         mode,
  input  logic [3:0]         dc_off,
  input  weight_row_t        w,
  input  act_t [I_NUM-1:0]   a,
  output logic               valid [N_PROD],
  output logic [BANK_W-1:0]  bank  [N_PROD],
  output logic [ADDR_W-1:0]  addr  [N_PROD]
);
  logic signed [COORD_W+2:0] xo [N_PROD];
  logic signed [COORD_W+2:0] yo [N_PROD];
  logic                      keep [N_PROD];

  always_comb begin
    for (int f = 0; f < F_NUM; f++) begin
      for (int i = 0; i < I_NUM; i++) begin
        automatic int p = f * I_NUM + i;
        automatic logic signed [COORD_W+2:0] dx, dy;
        dx = $signed({3'b000, a[i].x}) - $signed({{(COORD_W+3-KPOS_W){1'b0}}, w[f].kx});
        dy = $signed({3'b000, a[i].y}) - $signed({{(COORD_W+3-KPOS_W){1'b0}}, w[f].ky});
        keep[p] = a[i].valid && w[f].valid && (32'(w[f].k) < KC);
        unique case (mode)
          MODE_CONV2: begin
            xo[p] = dx >>> 1;
            yo[p] = dy >>> 1;
            keep[p] = keep[p] && !dx[0] && !dy[0];
          end
          MODE_DECONV: begin
            xo[p] = $signed({2'b00, a[i].x, 1'b0}) + $signed({{(COORD_W+3-KPOS_W){1'b0}}, w[f].kx})
                  - $signed({{(COORD_W-1){1'b0}}, dc_off});
            yo[p] = $signed({2'b00, a[i].y, 1'b0}) + $signed({{(COORD_W+3-KPOS_W){1'b0}}, w[f].ky})
                  - $signed({{(COORD_W-1){1'b0}}, dc_off});
          end
          default: begin
            xo[p] = dx;
            yo[p] = dy;
          end
        endcase
        valid[p] = keep[p] && (xo[p] >= 0) && (xo[p] < $signed((COORD_W+3)'(TILE_W)))
                           && (yo[p] >= 0) && (yo[p] < $signed((COORD_W+3)'(TILE_H)));
      end
    end
  end

  for (genvar f = 0; f < F_NUM; f++) begin : g_f
    for (genvar i = 0; i < I_NUM; i++) begin : g_i
      logic [GRP_W-1:0] unused_group;
      chess_map #(.TILE_W(TILE_W), .TILE_H(TILE_H), .KC(KC)) u_map (
        .x    (xo[f*I_NUM+i][COORD_W-1:0]),
        .y    (yo[f*I_NUM+i][COORD_W-1:0]),
        .k    (w[f].k),
        .bank (bank[f*I_NUM+i]),
        .addr (addr[f*I_NUM+i]),
        .group(unused_group)
      );
    end
  end
endmodule
