// tb_weight_buffer: fills every row with random weights, reads the rows back
// in random order and checks the data one cycle after the read.
module tb_weight_buffer;
  import sparse_stereo_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic we, re;
  logic [7:0] waddr, raddr;
  weight_row_t wdata, rdata;
  weight_row_t model [256];
  weight_buffer dut (.*);
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = '0;
    for (int r = 0; r < 256; r++) begin
      @(negedge clk);
      we = 1; waddr = 8'(r);
      for (int f = 0; f < F_NUM; f++) wdata[f] = weight_t'({$urandom, $urandom});
      model[r] = wdata;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 1000; t++) begin
      automatic int r = $urandom_range(0, 255);
      @(negedge clk); re = 1; raddr = 8'(r);
      @(negedge clk); re = 0;
      checks++;
      if (rdata != model[r]) failures++;
      // data must hold while no read is requested
      @(negedge clk);
      checks++;
      if (rdata != model[r]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
