// stereo_ref_pkg: test data generation and reference model for the PE and
// accelerator testbenches.
//
// Holds dense activation tiles (per PE and input channel) and a list of
// non-zero weights. The reference output is computed in gather form, directly
// from the definition of each operation:
//   unit stride  out[yo][xo] += in[yo+ky][xo+kx] * w
//   stride 2     out[yo][xo] += in[2yo+ky][2xo+kx] * w
//   deconv       out[yo][xo] += in[yi][xi] * w  where 2xi = xo - kx + dc_off
// which is independent of the scatter form the hardware uses. The package also
// packs the tiles into group-tagged vectors (four groups for stride 2, the two
// merged diagonal groups otherwise) and the weights into weight-buffer rows.
package stereo_ref_pkg;
  import sparse_stereo_pkg::*;

  localparam int MAXPE = 64;
  localparam int MAXC  = 4;
  localparam int MAXIN = 40;

  int in_act [MAXPE][MAXC][MAXIN][MAXIN];   // [pe][c][y][x]
  int in_w, in_h;

  typedef struct { int kx; int ky; int k; int c; int v; } wt_s;
  wt_s wts[$];

  function automatic int rnd_val();
    int v;
    v = int'($urandom_range(0, 14)) - 7;
    if (v == 0) v = 1;
    return v;
  endfunction

  // random sparse tiles for npe PEs and nc channels, density in percent
  function automatic void gen_inputs(int npe, int nc, int w, int h, int density);
    in_w = w; in_h = h;
    for (int p = 0; p < MAXPE; p++)
      for (int c = 0; c < MAXC; c++)
        for (int y = 0; y < MAXIN; y++)
          for (int x = 0; x < MAXIN; x++)
            in_act[p][c][y][x] = 0;
    for (int p = 0; p < npe; p++)
      for (int c = 0; c < nc; c++)
        for (int y = 0; y < h; y++)
          for (int x = 0; x < w; x++)
            if (int'($urandom_range(0, 99)) < density) in_act[p][c][y][x] = rnd_val();
  endfunction

  // random sparse kernels: ksz x ksz, kc output channels, nc input channels
  function automatic void gen_weights(int nc, int kc, int ksz, int density);
    wts.delete();
    for (int c = 0; c < nc; c++)
      for (int k = 0; k < kc; k++)
        for (int ky = 0; ky < ksz; ky++)
          for (int kx = 0; kx < ksz; kx++)
            if (int'($urandom_range(0, 99)) < density)
              wts.push_back('{kx: kx, ky: ky, k: k, c: c, v: rnd_val()});
  endfunction

  function automatic int get_in(int p, int c, int y, int x);
    if (x < 0 || y < 0 || x >= MAXIN || y >= MAXIN) return 0;
    return in_act[p][c][y][x];
  endfunction

  function automatic longint expected(int p, conv_mode_e mode, int dc, int k, int yo, int xo, bit relu);
    longint s = 0;
    foreach (wts[j]) begin
      if (wts[j].k != k) continue;
      case (mode)
        MODE_CONV1: s += longint'(get_in(p, wts[j].c, yo + wts[j].ky, xo + wts[j].kx)) * wts[j].v;
        MODE_CONV2: s += longint'(get_in(p, wts[j].c, 2*yo + wts[j].ky, 2*xo + wts[j].kx)) * wts[j].v;
        default: begin
          int nx = xo - wts[j].kx + dc;
          int ny = yo - wts[j].ky + dc;
          if (nx % 2 == 0 && ny % 2 == 0 && nx >= 0 && ny >= 0)
            s += longint'(get_in(p, wts[j].c, ny / 2, nx / 2)) * wts[j].v;
        end
      endcase
    end
    if (relu && s < 0) s = 0;
    if (s > 32767) s = 32767;
    if (s < -32768) s = -32768;
    return s;
  endfunction

  // group-tagged vectors of one PE and channel, padded with empty vectors to len
  function automatic void pack_inputs(int p, int c, conv_mode_e mode, ref act_vec_t q[$]);
    int ngrp = (mode == MODE_CONV2) ? 4 : 2;
    q.delete();
    for (int g = 0; g < ngrp; g++) begin
      act_vec_t v;
      int n = 0;
      v = '0;
      for (int y = 0; y < in_h; y++)
        for (int x = 0; x < in_w; x++) begin
          int gg = (y % 2) * 2 + (x % 2);
          bit in_g = (mode == MODE_CONV2) ? (gg == g) : ((g == 0) ? (gg == 0 || gg == 3) : (gg == 1 || gg == 2));
          if (in_g && in_act[p][c][y][x] != 0) begin
            v.group = GRP_W'(g);
            v.a[n].valid = 1'b1;
            v.a[n].value = DATA_W'(in_act[p][c][y][x]);
            v.a[n].x = COORD_W'(x);
            v.a[n].y = COORD_W'(y);
            n++;
            if (n == I_NUM) begin q.push_back(v); v = '0; n = 0; end
          end
        end
      if (n != 0) q.push_back(v);
    end
  endfunction

  // weight sets (4 rows each) of channel c. Stride 2: row g holds weights of
  // parity group g. Other modes: rows filled in order, deconvolution weights
  // interleaved over the four parity sub-kernels.
  function automatic void pack_weights(int c, conv_mode_e mode, ref weight_row_t rows[$]);
    wt_s bygrp[4][$];
    rows.delete();
    foreach (wts[j]) if (wts[j].c == c) bygrp[(wts[j].ky % 2) * 2 + (wts[j].kx % 2)].push_back(wts[j]);
    if (mode == MODE_CONV2) begin
      while (bygrp[0].size() + bygrp[1].size() + bygrp[2].size() + bygrp[3].size() != 0) begin
        for (int g = 0; g < 4; g++) begin
          weight_row_t r = '0;
          for (int f = 0; f < F_NUM; f++)
            if (bygrp[g].size() != 0) begin
              wt_s w = bygrp[g].pop_front();
              r[f] = '{valid: 1'b1, value: DATA_W'(w.v), kx: KPOS_W'(w.kx), ky: KPOS_W'(w.ky), k: KCH_W'(w.k)};
            end
          rows.push_back(r);
        end
      end
    end else begin
      wt_s flat[$];
      int g = 0;
      // take the four sub-kernels in turn so a row mixes output parities
      while (bygrp[0].size() + bygrp[1].size() + bygrp[2].size() + bygrp[3].size() != 0) begin
        if (bygrp[g].size() != 0) flat.push_back(bygrp[g].pop_front());
        g = (g + 1) % 4;
      end
      while (flat.size() != 0) begin
        weight_row_t r = '0;
        for (int f = 0; f < F_NUM; f++)
          if (flat.size() != 0) begin
            wt_s w = flat.pop_front();
            r[f] = '{valid: 1'b1, value: DATA_W'(w.v), kx: KPOS_W'(w.kx), ky: KPOS_W'(w.ky), k: KCH_W'(w.k)};
          end
        rows.push_back(r);
      end
      while (rows.size() % 4 != 0) rows.push_back('0);
    end
  endfunction
endpackage
