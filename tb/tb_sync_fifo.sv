// tb_sync_fifo: random pushes and pops against a queue model; checks order,
// count, the full and empty flags, and that full and empty both occurred.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_full = 0, n_empty_pop = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [15:0] in_data, out_data;
  logic [2:0] count;
  logic [15:0] q[$];
  sync_fifo #(.T(logic [15:0]), .DEPTH(4)) dut (.*);
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    in_valid = 0; out_ready = 0; in_data = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 99) < (t % 400 < 200 ? 70 : 30));
      out_ready = ($urandom_range(0, 99) < (t % 400 < 200 ? 30 : 70));
      in_data = 16'($urandom);
      #1;
      checks++;
      if (int'(count) != q.size() || in_ready != (q.size() < 4) || out_valid != (q.size() != 0)
          || (out_valid && out_data != q[0])) failures++;
      if (!in_ready) n_full++;
      if (!out_valid && out_ready) n_empty_pop++;
      @(posedge clk);
      if (out_valid && out_ready) void'(q.pop_front());
      if (in_valid && in_ready) q.push_back(in_data);
    end
    checks++; if (n_full == 0 || n_empty_pop == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
