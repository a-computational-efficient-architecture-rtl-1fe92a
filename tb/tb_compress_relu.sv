// tb_compress_relu: random drained blocks (sparse, with negative and
// out-of-range sums) with ReLU on and off. Every non-zero pixel after ReLU and
// saturation must come out exactly once, with its coordinates, channel and
// group; vectors must come group by group, and each vector must be full
// except the last one of a group. The output is throttled at random.
module tb_compress_relu;
  import sparse_stereo_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_sat = 0;
  logic relu, blk_valid, blk_ready, out_valid, out_ready;
  logic [6:0] blk_addr;
  logic signed [ACC_W-1:0] blk_data [N_BANKS];
  out_vec_t out_data;
  compress_relu #(.TILE_W(16), .TILE_H(16), .KC(16)) dut (.*);
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    relu = 0; blk_valid = 0; blk_addr = 0; out_ready = 0;
    for (int b = 0; b < N_BANKS; b++) blk_data[b] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      automatic int expv [16][16];
      automatic bit expn [16][16];
      automatic int blk = $urandom_range(0, 127);
      automatic int bx0 = ((blk % 8) % 2) * 8, by0 = ((blk % 8) / 2) * 4, k = blk / 8;
      automatic int nexp = 0, ngot = 0, last_grp = 0;
      automatic bit short_seen [4] = '{0, 0, 0, 0};
      relu = t[0];
      for (int b = 0; b < N_BANKS; b++) begin
        automatic int x = bx0 + (b / 16) * 4 + b % 4, y = by0 + (b / 4) % 4;
        automatic longint v = 0;
        if ($urandom_range(0, 2) == 0) v = longint'(int'($urandom_range(0, 2000)) - 1000);
        if ($urandom_range(0, 40) == 0) v = ($urandom_range(0, 1) == 1) ? 70000 : -70000;
        blk_data[b] = ACC_W'(v);
        if (relu && v < 0) v = 0;
        if (v > 32767) begin v = 32767; n_sat++; end
        if (v < -32768) begin v = -32768; n_sat++; end
        expv[y][x] = int'(v); expn[y][x] = (v != 0);
        if (v != 0) nexp++;
      end
      blk_addr = 7'(blk);
      while (!blk_ready) @(negedge clk);
      blk_valid = 1;
      @(negedge clk);
      blk_valid = 0;
      while (!blk_ready || out_valid) begin
        out_ready = ($urandom_range(0, 2) != 0);
        #1;
        if (out_valid && out_ready) begin
          automatic int cnt = 0;
          checks++;
          if (int'(out_data.group) < last_grp || short_seen[out_data.group]) failures++;
          last_grp = out_data.group;
          for (int i = 0; i < I_NUM; i++) if (out_data.a[i].valid) begin
            automatic int x = out_data.a[i].x, y = out_data.a[i].y;
            cnt++;
            checks++;
            if (int'(out_data.a[i].k) != k || x < bx0 || x >= bx0 + 8 || y < by0 || y >= by0 + 4 ||
                !expn[y][x] || int'(out_data.a[i].value) != expv[y][x] ||
                int'(out_data.group) != (y % 2) * 2 + x % 2) begin
              failures++;
              if (failures < 5) $display("block %0d: bad record x%0d y%0d v%0d", blk, x, y, out_data.a[i].value);
            end else expn[y][x] = 0;
            ngot++;
          end
          if (cnt < I_NUM) short_seen[out_data.group] = 1;
        end
        @(negedge clk);
      end
      checks++;
      if (ngot != nexp) begin failures++; $display("block %0d: %0d records, expected %0d", blk, ngot, nexp); end
    end
    checks++; if (n_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
