// tb_pe_controller: drives the controller with models of its surroundings (an
// input FIFO drained at random, banks and compression unit that are busy at
// random) and checks the sequences it issues: the clear sweep after reset,
// the four weight-row reads of OP_MAC, the group-buffer read addresses and
// row tags of every pass (skipping rows without valid weights, one pass in
// stride-2 mode), that the FIFO is never over-filled, and the drain sweep of
// OP_DRAIN, issued only when the banks are idle and the compression unit ready.
module tb_pe_controller;
  import sparse_stereo_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic cmd_valid, cmd_ready;
  pe_cmd_t cmd;
  logic wb_re, wr_load, gb_re, if_push, mac_empty, banks_idle, blk_ready, acc_clr, acc_drn, relu, busy;
  logic [7:0] wb_raddr;
  logic [GRP_W-1:0] wr_row, if_row;
  weight_row_t wr_data;
  logic [8:0] gb_raddr;
  logic [2:0] if_count;
  logic [6:0] acc_addr;
  conv_mode_e mode;
  logic [3:0] dc_off;
  pe_controller #(.ACC_DEPTH(128), .WB_DEPTH(256), .GB_DEPTH(512), .IF_DEPTH(4)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // environment models and monitors
  int fifo = 0;
  int blk_busy = 0;
  logic [3:0] row_valid;
  int clr_seq[$], wb_seq[$], gb_seq[$], row_seq[$], drn_seq[$];
  int pend_row = -1;
  always @(posedge clk) begin
    if (rst_n) begin
      if (acc_clr) clr_seq.push_back(acc_addr);
      if (wb_re) wb_seq.push_back(wb_raddr);
      if (gb_re) gb_seq.push_back(gb_raddr);
      if (if_push) row_seq.push_back(if_row);
      if (acc_drn) begin
        drn_seq.push_back(acc_addr);
        checks++;
        if (!banks_idle || !blk_ready) failures++;
      end
      // weight buffer: one cycle latency, row valid pattern from row_valid
      wr_data <= '0;
      if (wb_re) for (int f = 0; f < F_NUM; f++) wr_data[f].valid <= row_valid[wb_raddr % 4] && f == 0;
      // FIFO model
      fifo = fifo + (if_push ? 1 : 0) - ((fifo > 0 && $urandom_range(0, 2) == 0) ? 1 : 0);
      checks++;
      if (fifo > 4) failures++;
      if_count <= 3'(fifo);
      mac_empty <= (fifo == 0);
      banks_idle <= ($urandom_range(0, 3) != 0);
      if (acc_drn) blk_busy = $urandom_range(2, 6);
      else if (blk_busy > 0) blk_busy--;
      blk_ready <= (blk_busy == 0);
    end
  end

  task automatic send(pe_cmd_t c);
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd = c; cmd_valid = 1;
    @(negedge clk);
    cmd_valid = 0;
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
  endtask

  initial begin
    cmd_valid = 0; cmd = '0; if_count = 0; mac_empty = 1; banks_idle = 1; blk_ready = 1; wr_data = '0;
    row_valid = 4'hF;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    checks++;
    if (clr_seq.size() != 128) failures++;
    foreach (clr_seq[j]) begin checks++; if (clr_seq[j] != j) failures++; end
    for (int t = 0; t < 60; t++) begin
      automatic conv_mode_e m = conv_mode_e'(t % 3);
      automatic int wr = $urandom_range(0, 200), ib = $urandom_range(0, 300), il = $urandom_range(0, 20);
      automatic int exp_gb[$], exp_row[$];
      row_valid = 4'($urandom);
      wb_seq.delete(); gb_seq.delete(); row_seq.delete();
      send('{op: OP_MAC, mode: m, w_row: 8'(wr), in_base: 12'(ib), in_len: 12'(il), dc_off: 0, relu: 0});
      for (int r = 0; r < 4; r++)
        if (m == MODE_CONV2 ? r == 0 : row_valid[(wr + r) % 4])
          for (int j = 0; j < il; j++) begin exp_gb.push_back(ib + j); exp_row.push_back(r); end
      checks++;
      if (wb_seq.size() != 4 || wb_seq[0] != wr || wb_seq[3] != wr + 3) failures++;
      checks++;
      if (gb_seq != exp_gb || row_seq != exp_row) begin
        failures++;
        $display("cmd %0d mode %0d: %0d reads, expected %0d", t, m, gb_seq.size(), exp_gb.size());
      end
    end
    drn_seq.delete();
    send('{op: OP_DRAIN, mode: MODE_CONV1, w_row: 0, in_base: 0, in_len: 0, dc_off: 0, relu: 1});
    checks++;
    if (drn_seq.size() != 128) failures++;
    foreach (drn_seq[j]) begin checks++; if (drn_seq[j] != j) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
