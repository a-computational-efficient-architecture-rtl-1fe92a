// tb_product_crossbar: random products; every bank must see exactly the
// products addressed to it, with address and data unchanged.
module tb_product_crossbar;
  import sparse_stereo_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid [N_PROD];
  logic [BANK_W-1:0] in_bank [N_PROD];
  logic [6:0] in_addr [N_PROD];
  logic signed [PROD_W-1:0] in_data [N_PROD];
  logic out_valid [N_BANKS][N_PROD];
  logic [6:0] out_addr [N_BANKS][N_PROD];
  logic signed [PROD_W-1:0] out_data [N_BANKS][N_PROD];
  product_crossbar #(.ADDR_W(7)) dut (.*);
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int p = 0; p < N_PROD; p++) begin
        in_valid[p] = ($urandom_range(0, 3) != 0);
        in_bank[p] = BANK_W'($urandom);
        in_addr[p] = 7'($urandom);
        in_data[p] = PROD_W'($urandom);
      end
      @(posedge clk);
      for (int b = 0; b < N_BANKS; b++)
        for (int p = 0; p < N_PROD; p++) begin
          automatic bit e = in_valid[p] && int'(in_bank[p]) == b;
          checks++;
          if (out_valid[b][p] != e || (e && (out_addr[b][p] != in_addr[p] || out_data[b][p] != in_data[p]))) failures++;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
