// tb_conflict_buffer: random clusters on few addresses pushed and popped at
// random. Checks that the per-address total of what leaves equals what
// entered, that no more than DEPTH entries are ever queued, that a cluster
// whose address is queued is merged, and that merging happened.
module tb_conflict_buffer;
  import sparse_stereo_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_merge = 0;
  logic in_valid, in_ready, out_valid, out_pop, empty, merged;
  logic [6:0] in_addr, out_addr;
  logic signed [ACC_W-1:0] in_sum, out_sum;
  longint tot_in [128], tot_out [128];
  int qa[$];
  conflict_buffer #(.ADDR_W(7), .DEPTH(4)) dut (.*);
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    in_valid = 0; out_pop = 0; in_addr = 0; in_sum = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 6000; t++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 99) < 60);
      in_addr = 7'($urandom_range(0, 5));
      in_sum = ACC_W'(int'($urandom_range(0, 100)) - 50);
      out_pop = ($urandom_range(0, 99) < 45);
      #1;
      // model of the queue addresses
      checks++;
      if (out_valid != (qa.size() != 0) || (out_valid && int'(out_addr) != qa[0])) failures++;
      @(posedge clk);
      begin
        automatic bit popped = out_valid && out_pop;
        automatic int m = -1;
        if (popped) begin tot_out[out_addr] += out_sum; void'(qa.pop_front()); end
        foreach (qa[j]) if (qa[j] == in_addr && m < 0) m = j;
        if (in_valid && in_ready) begin
          tot_in[in_addr] += in_sum;
          checks++;
          if (merged != (m >= 0)) failures++;
          if (merged) n_merge++;
          else qa.push_back(in_addr);
        end
        checks++;
        if (qa.size() > 4) failures++;
      end
    end
    @(negedge clk);
    out_pop = 1; in_valid = 0;
    #1;
    while (out_valid) begin
      tot_out[out_addr] += out_sum;
      @(negedge clk); #1;
    end
    for (int a = 0; a < 128; a++) begin
      checks++;
      if (tot_in[a] != tot_out[a]) begin failures++; $display("addr %0d: in %0d out %0d", a, tot_in[a], tot_out[a]); end
    end
    checks++; if (n_merge == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
