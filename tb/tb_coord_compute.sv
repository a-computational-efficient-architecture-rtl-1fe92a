// tb_coord_compute: random weight rows and activation vectors in all three
// modes. For each product the expected output pixel is found by searching the
// tile for the pixel the pair contributes to, using the gather form of each
// operation (in[yo+ky][xo+kx], in[2yo+ky][2xo+kx], or 2*xi = xo - kx + dc);
// valid, bank and address are compared.
module tb_coord_compute;
  import sparse_stereo_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int nvalid [3] = '{0, 0, 0};
  conv_mode_e mode;
  logic [3:0] dc_off;
  weight_row_t w;
  act_t [I_NUM-1:0] a;
  logic valid [N_PROD];
  logic [BANK_W-1:0] bank [N_PROD];
  logic [6:0] addr [N_PROD];
  coord_compute #(.TILE_W(16), .TILE_H(16), .KC(16)) dut (.mode, .dc_off, .w, .a, .valid, .bank, .addr);
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int t = 0; t < 3000; t++) begin
      mode = conv_mode_e'(t % 3);
      dc_off = 4'($urandom_range(0, 4));
      for (int f = 0; f < F_NUM; f++)
        w[f] = '{valid: ($urandom_range(0, 7) != 0), value: 1, kx: 3'($urandom_range(0, 3)),
                 ky: 3'($urandom_range(0, 3)), k: 4'($urandom)};
      for (int i = 0; i < I_NUM; i++)
        a[i] = '{valid: ($urandom_range(0, 7) != 0), value: 1,
                 x: 6'($urandom_range(0, mode == MODE_CONV2 ? 36 : 20)),
                 y: 6'($urandom_range(0, mode == MODE_CONV2 ? 36 : 20))};
      @(posedge clk);
      for (int f = 0; f < F_NUM; f++)
        for (int i = 0; i < I_NUM; i++) begin
          automatic int p = f * I_NUM + i;
          automatic bit ev = 0;
          automatic int ex = 0, ey = 0;
          for (int yo = 0; yo < 16; yo++)
            for (int xo = 0; xo < 16; xo++) begin
              automatic bit hit;
              case (mode)
                MODE_CONV1: hit = (xo + w[f].kx == a[i].x) && (yo + w[f].ky == a[i].y);
                MODE_CONV2: hit = (2*xo + w[f].kx == a[i].x) && (2*yo + w[f].ky == a[i].y);
                default:    hit = (xo - w[f].kx + dc_off == 2*a[i].x) && (yo - w[f].ky + dc_off == 2*a[i].y);
              endcase
              if (hit) begin ev = 1; ex = xo; ey = yo; end
            end
          ev = ev && w[f].valid && a[i].valid;
          checks++;
          if (valid[p] != ev || (ev && (int'(bank[p]) != ((ex % 8) / 4) * 16 + (ey % 4) * 4 + ex % 4 ||
                                        int'(addr[p]) != w[f].k * 8 + (ey / 4) * 2 + ex / 8))) begin
            failures++;
            if (failures < 5) $display("mode %0d p%0d: valid %0d/%0d bank %0d addr %0d (x%0d y%0d)", mode, p, valid[p], ev, bank[p], addr[p], ex, ey);
          end
          if (ev) nvalid[mode]++;
        end
    end
    for (int m = 0; m < 3; m++) begin
      checks++;
      if (nvalid[m] < 100) begin failures++; $display("mode %0d produced few valid products", m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
