// tb_conflict_detect: random product sets with few distinct addresses. Each
// set must leave as one cluster per distinct address, in the order of each
// address's first lane, with the right sums; with the buffer always ready a
// set with n addresses must hold the array for exactly n-1 cycles. The buffer
// is also throttled to check that no cluster is lost.
module tb_conflict_detect;
  import sparse_stereo_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_conf = 0;
  logic load, ready, cl_valid, cl_ready, idle, conflict;
  logic in_valid [N_PROD];
  logic [6:0] in_addr [N_PROD];
  logic signed [PROD_W-1:0] in_data [N_PROD];
  logic [6:0] cl_addr;
  logic signed [ACC_W-1:0] cl_sum;
  conflict_detect #(.ADDR_W(7)) dut (.*);
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    load = 0; cl_ready = 1;
    for (int p = 0; p < N_PROD; p++) begin in_valid[p] = 0; in_addr[p] = 0; in_data[p] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      automatic int exp_addr[$];
      automatic longint exp_sum[$];
      automatic int hold = 0, got = 0;
      automatic bit throttle = (t >= 1000);
      for (int p = 0; p < N_PROD; p++) begin
        in_valid[p] = ($urandom_range(0, 2) == 0);
        in_addr[p] = 7'($urandom_range(0, 3) * 5);
        in_data[p] = PROD_W'(int'($urandom_range(0, 2000)) - 1000);
        if (in_valid[p]) begin
          automatic int j = -1;
          foreach (exp_addr[e]) if (exp_addr[e] == in_addr[p]) j = e;
          if (j < 0) begin exp_addr.push_back(in_addr[p]); exp_sum.push_back(in_data[p]); end
          else exp_sum[j] += in_data[p];
        end
      end
      // wait for ready, then load
      while (!ready) @(negedge clk);
      load = 1;
      @(negedge clk);
      load = 0;
      while (got < exp_addr.size()) begin
        cl_ready = throttle ? ($urandom_range(0, 1) == 1) : 1'b1;
        #1;
        if (conflict) n_conf++;
        if (cl_valid && cl_ready) begin
          checks++;
          if (int'(cl_addr) != exp_addr[got] || longint'(cl_sum) != exp_sum[got]) begin
            failures++;
            if (failures < 5) $display("set %0d cluster %0d: addr %0d sum %0d, expected %0d %0d", t, got, cl_addr, cl_sum, exp_addr[got], exp_sum[got]);
          end
          got++;
        end
        if (!ready) hold++;
        @(negedge clk);
      end
      cl_ready = 1;
      if (!throttle && exp_addr.size() > 0) begin
        checks++;
        if (hold != exp_addr.size() - 1) begin failures++; $display("set %0d: held %0d cycles for %0d addresses", t, hold, exp_addr.size()); end
      end
      checks++;
      if (!idle) failures++;
    end
    checks++; if (n_conf == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
