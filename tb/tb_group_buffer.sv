// tb_group_buffer: fills every word with random activation vectors, reads the rows back
// in random order and checks the data one cycle after the read.
module tb_group_buffer;
  import sparse_stereo_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic we, re;
  logic [8:0] waddr, raddr;
  act_vec_t wdata, rdata;
  act_vec_t model [512];
  group_buffer dut (.*);
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = '0;
    for (int r = 0; r < 512; r++) begin
      @(negedge clk);
      we = 1; waddr = 9'(r);
      wdata = act_vec_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      model[r] = wdata;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 1000; t++) begin
      automatic int r = $urandom_range(0, 511);
      @(negedge clk); re = 1; raddr = 9'(r);
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
