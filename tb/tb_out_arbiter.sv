// tb_out_arbiter: four requesters with random traffic. Checks that only a
// requesting input is granted, at most one per cycle, that the data and source
// match, and that with all four requesting the grants rotate 0, 1, 2, 3.
module tb_out_arbiter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [3:0] req_valid, req_ready;
  logic [7:0] req_data [4];
  logic out_valid, out_ready;
  logic [7:0] out_data;
  logic [1:0] out_src;
  out_arbiter #(.T(logic [7:0]), .N(4)) dut (.*);
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    automatic int prev = -1;
    req_valid = 0; out_ready = 0;
    for (int i = 0; i < 4; i++) req_data[i] = 8'(i * 17);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      automatic bit all = (t >= 2000);
      @(negedge clk);
      req_valid = all ? 4'hF : 4'($urandom);
      out_ready = all ? 1'b1 : ($urandom_range(0, 3) != 0);
      #1;
      checks++;
      if (out_valid != (req_valid != 0) || (out_valid && !req_valid[out_src]) ||
          (out_valid && out_data != req_data[out_src]) ||
          req_ready != ((out_valid && out_ready) ? 4'(1 << out_src) : 4'h0)) failures++;
      if (all) begin
        checks++;
        if (prev >= 0 && int'(out_src) != (prev + 1) % 4) failures++;
        prev = out_src;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
