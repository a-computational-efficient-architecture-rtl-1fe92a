// tb_bank_slice: random product sets (few addresses, so same-cycle and
// adjacent-cycle conflicts are frequent) are loaded whenever the slice is
// ready; after the slice goes idle every word is drained and compared with
// the per-address sum of all products.
module tb_bank_slice;
  import sparse_stereo_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_conf = 0, n_merge = 0, n_notready = 0;
  logic load, ready, clr, drn, drn_valid, idle, conflict, merged;
  logic in_valid [N_PROD];
  logic [6:0] in_addr [N_PROD];
  logic signed [PROD_W-1:0] in_data [N_PROD];
  logic [6:0] ctl_addr;
  logic signed [ACC_W-1:0] drn_data;
  longint model [128];
  bank_slice #(.DEPTH(128), .CB_DEPTH(4)) dut (.*);
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(posedge clk) begin
    if (conflict) n_conf++;
    if (merged) n_merge++;
  end
  initial begin
    load = 0; clr = 0; drn = 0; ctl_addr = 0;
    for (int p = 0; p < N_PROD; p++) begin in_valid[p] = 0; in_addr[p] = 0; in_data[p] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < 128; a++) begin @(negedge clk); clr = 1; ctl_addr = 7'(a); model[a] = 0; end
    @(negedge clk); clr = 0;
    for (int t = 0; t < 3000; t++) begin
      for (int p = 0; p < N_PROD; p++) begin
        in_valid[p] = ($urandom_range(0, 7) == 0);
        in_addr[p] = 7'($urandom_range(0, 3) * 9 + t % 4);
        in_data[p] = PROD_W'(int'($urandom_range(0, 200)) - 100);
      end
      #1;
      while (!ready) begin n_notready++; @(negedge clk); #1; end
      load = 1;
      for (int p = 0; p < N_PROD; p++) if (in_valid[p]) model[in_addr[p]] += in_data[p];
      @(negedge clk);
      load = 0;
    end
    while (!idle) @(negedge clk);
    for (int a = 0; a < 128; a++) begin
      @(negedge clk); drn = 1; ctl_addr = 7'(a);
      @(negedge clk); drn = 0;
      checks++;
      if (!drn_valid || longint'(drn_data) != model[a]) begin
        failures++;
        if (failures < 5) $display("addr %0d: %0d expected %0d", a, drn_data, model[a]);
      end
    end
    checks++; if (n_conf == 0 || n_merge == 0 || n_notready == 0) begin failures++; $display("events: conflict %0d merge %0d hold %0d", n_conf, n_merge, n_notready); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
