// tb_weight_regs: loads four random rows, then checks the selected row: by the
// activation group in stride-2 mode, by the pass row in the other modes.
module tb_weight_regs;
  import sparse_stereo_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic load;
  logic [GRP_W-1:0] load_row, act_group, pass_row;
  weight_row_t load_data, sel;
  conv_mode_e mode;
  weight_row_t model [4];
  weight_regs dut (.*);
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    load = 0; load_row = 0; load_data = '0; mode = MODE_CONV1; act_group = 0; pass_row = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      for (int r = 0; r < 4; r++) begin
        @(negedge clk);
        load = 1; load_row = GRP_W'(r);
        for (int f = 0; f < F_NUM; f++) load_data[f] = weight_t'({$urandom, $urandom});
        model[r] = load_data;
      end
      @(negedge clk); load = 0;
      for (int j = 0; j < 24; j++) begin
        mode = conv_mode_e'(j % 3);
        act_group = GRP_W'($urandom); pass_row = GRP_W'($urandom);
        #1;
        checks++;
        if (sel != model[mode == MODE_CONV2 ? act_group : pass_row]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
