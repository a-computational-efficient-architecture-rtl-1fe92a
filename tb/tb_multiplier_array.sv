// tb_multiplier_array: random signed operands, every product p = f*4 + i
// compared with the integer product of weight f and activation i.
module tb_multiplier_array;
  import sparse_stereo_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  weight_row_t w;
  act_t [I_NUM-1:0] a;
  logic signed [PROD_W-1:0] prod [N_PROD];
  multiplier_array dut (.w, .a, .prod);
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int t = 0; t < 2000; t++) begin
      for (int f = 0; f < F_NUM; f++) begin w[f] = '0; w[f].value = DATA_W'($urandom); end
      for (int i = 0; i < I_NUM; i++) begin a[i] = '0; a[i].value = DATA_W'($urandom); end
      if (t == 0) begin w[0].value = 16'sh8000; a[0].value = 16'sh8000; end
      @(posedge clk);
      for (int f = 0; f < F_NUM; f++)
        for (int i = 0; i < I_NUM; i++) begin
          checks++;
          if (longint'(prod[f*I_NUM+i]) != longint'(w[f].value) * longint'(a[i].value)) begin
            failures++;
            if (failures < 5) $display("f%0d i%0d: %0d * %0d -> %0d", f, i, w[f].value, a[i].value, prod[f*I_NUM+i]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
