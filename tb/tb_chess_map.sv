// tb_chess_map: exhaustive check of the block-based chess mapping over a
// 16 x 16 tile and 16 channels: bank, address and group against the
// closed-form mapping, and that no two pixels share a bank word.
module tb_chess_map;
  import sparse_stereo_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [COORD_W-1:0] x, y;
  logic [KCH_W-1:0] k;
  logic [BANK_W-1:0] bank;
  logic [6:0] addr;
  logic [GRP_W-1:0] group;
  chess_map #(.TILE_W(16), .TILE_H(16), .KC(16)) dut (.x, .y, .k, .bank, .addr, .group);
  bit used [32][128];
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int kk = 0; kk < 16; kk++)
      for (int yy = 0; yy < 16; yy++)
        for (int xx = 0; xx < 16; xx++) begin
          x = COORD_W'(xx); y = COORD_W'(yy); k = KCH_W'(kk);
          @(posedge clk);
          checks++;
          if (int'(bank) != ((xx % 8) / 4) * 16 + (yy % 4) * 4 + (xx % 4) ||
              int'(addr) != kk * 8 + (yy / 4) * 2 + xx / 8 ||
              int'(group) != (yy % 2) * 2 + (xx % 2) || used[bank][addr]) begin
            failures++;
            if (failures < 5) $display("x%0d y%0d k%0d: bank %0d addr %0d group %0d", xx, yy, kk, bank, addr, group);
          end
          used[bank][addr] = 1;
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
