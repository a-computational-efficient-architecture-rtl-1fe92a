// tb_acc_bank: clears the bank, applies a stream of random updates, drains
// every word and checks it against a model; a second drain must return zero.
// Also checks that a continuous stream of updates is taken at one update per
// two cycles (single-port read and store).
module tb_acc_bank;
  import sparse_stereo_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic upd_valid, upd_pop, clr, drn, drn_valid, busy;
  logic [6:0] upd_addr, ctl_addr;
  logic signed [ACC_W-1:0] upd_sum, drn_data;
  longint model [128];
  acc_bank #(.DEPTH(128)) dut (.*);
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic drain_all(bit expect_zero);
    for (int a = 0; a < 128; a++) begin
      @(negedge clk); drn = 1; ctl_addr = 7'(a);
      @(negedge clk); drn = 0;
      checks++;
      if (!drn_valid || longint'(drn_data) != (expect_zero ? 0 : model[a])) begin
        failures++;
        if (failures < 5) $display("addr %0d: %0d expected %0d", a, drn_data, model[a]);
      end
    end
  endtask
  initial begin
    automatic int pops = 0, t0;
    upd_valid = 0; clr = 0; drn = 0; ctl_addr = 0; upd_addr = 0; upd_sum = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < 128; a++) begin
      @(negedge clk); clr = 1; ctl_addr = 7'(a); model[a] = 0;
    end
    @(negedge clk); clr = 0;
    // continuous updates
    upd_valid = 1;
    t0 = 0;
    for (int t = 0; t < 4000; t++) begin
      upd_addr = 7'($urandom_range(0, 127));
      upd_sum = ACC_W'(int'($urandom_range(0, 2000)) - 1000);
      #1;
      if (upd_pop) begin model[upd_addr] += upd_sum; pops++; end
      @(negedge clk);
    end
    upd_valid = 0;
    @(negedge clk);
    checks++;
    if (pops != 2000) begin failures++; $display("%0d updates in 4000 cycles, expected 2000", pops); end
    drain_all(0);
    drain_all(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
