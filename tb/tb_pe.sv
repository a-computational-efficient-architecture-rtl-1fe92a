// tb_pe: end-to-end test of one processing element.
//
// Runs three layers through the PE with a group buffer attached: a unit-stride
// 3x3 convolution, a stride-2 3x3 convolution and a stride-2 4x4
// deconvolution, each with two input channels, 16 output channels and random
// sparse data. Every layer is loaded (weights, group buffer), processed with
// one OP_MAC per input channel and weight set, drained with OP_DRAIN, and the
// compressed output is compared pixel by pixel with the gather-form reference
// model of stereo_ref_pkg. The output port is throttled at random. Also checks
// that the array took one vector per pass per cycle budget (perf_vec) and that
// stalls, same-cycle conflicts, buffer merges and ReLU clamping all occurred.
module tb_pe;
  import sparse_stereo_pkg::*;
  import stereo_ref_pkg::*;

  localparam int TILE = 16;
  localparam int KC   = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cmd_valid, cmd_ready;
  pe_cmd_t cmd;
  logic wb_we;
  logic [7:0] wb_waddr;
  weight_row_t wb_wdata;
  logic gb_re, gb_we;
  logic [8:0] gb_raddr, gb_waddr;
  act_vec_t gb_rdata, gb_wdata;
  logic out_valid, out_ready;
  out_vec_t out_data;
  logic busy;
  logic [31:0] perf_vec, perf_stall, perf_conflict, perf_merge;

  group_buffer #(.DEPTH(512)) u_gb (.clk, .we(gb_we), .waddr(gb_waddr), .wdata(gb_wdata),
                                    .re(gb_re), .raddr(gb_raddr), .rdata(gb_rdata));
  pe dut (.clk, .rst_n, .cmd_valid, .cmd_ready, .cmd, .wb_we, .wb_waddr, .wb_wdata,
          .gb_re, .gb_raddr, .gb_rdata, .out_valid, .out_ready, .out_data, .busy,
          .perf_vec, .perf_stall, .perf_conflict, .perf_merge);

  int checks = 0, failures = 0;
  int cycles = 0;
  int n_backpressure = 0, n_relu_clamp = 0;
  int modes_run [3] = '{0, 0, 0};
  always @(posedge clk) cycles++;

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output collection
  int got [KC][TILE][TILE];
  bit seen [KC][TILE][TILE];
  int dup = 0, bad_group = 0;
  always @(posedge clk) begin
    out_ready <= ($urandom_range(0, 3) != 0);
    if (rst_n && out_valid && !out_ready) n_backpressure++;
    if (rst_n && out_valid && out_ready) begin
      for (int i = 0; i < I_NUM; i++) if (out_data.a[i].valid) begin
        automatic int k = out_data.a[i].k, y = out_data.a[i].y, x = out_data.a[i].x;
        if (seen[k][y][x]) begin dup++; if (dup < 5) $display("dup k%0d y%0d x%0d v%0d grp%0d t=%0d", k, y, x, out_data.a[i].value, out_data.group, cycles); end
        seen[k][y][x] = 1;
        got[k][y][x] = out_data.a[i].value;
        if (out_data.group != {out_data.a[i].y[0], out_data.a[i].x[0]}) bad_group++;
      end
    end
  end

  task automatic send(pe_cmd_t c);
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd = c; cmd_valid = 1;
    @(negedge clk);
    cmd_valid = 0;
  endtask

  task automatic run_layer(conv_mode_e mode, int ksz, int in_sz, int dc, bit relu);
    weight_row_t rows[$];
    act_vec_t vq[$];
    int wbase [MAXC][$];
    int gbase [MAXC], glen [MAXC];
    int waddr = 0, gaddr = 0;
    int exp_vec = 0;
    int v0;
    gen_inputs(1, 2, in_sz, in_sz, 50);
    gen_weights(2, KC, ksz, 25);
    for (int c = 0; c < 2; c++) begin
      pack_weights(c, mode, rows);
      foreach (rows[r]) begin
        if (r % 4 == 0) wbase[c].push_back(waddr);
        @(negedge clk); wb_we = 1; wb_waddr = 8'(waddr); wb_wdata = rows[r];
        waddr++;
      end
      pack_inputs(0, c, mode, vq);
      gbase[c] = gaddr; glen[c] = vq.size();
      foreach (vq[j]) begin
        @(negedge clk); gb_we = 1; gb_waddr = 9'(gaddr); gb_wdata = vq[j];
        gaddr++;
      end
      // vectors the array must take: one pass (stride 2) or one per non-empty row
      for (int s = 0; s < wbase[c].size(); s++) begin
        if (mode == MODE_CONV2) exp_vec += glen[c];
        else for (int r = 0; r < 4; r++) if (rows[s*4+r] != '0) exp_vec += glen[c];
      end
    end
    @(negedge clk); wb_we = 0; gb_we = 0;
    for (int k = 0; k < KC; k++) for (int y = 0; y < TILE; y++) for (int x = 0; x < TILE; x++) begin
      seen[k][y][x] = 0; got[k][y][x] = 0;
    end
    v0 = perf_vec;
    for (int c = 0; c < 2; c++)
      foreach (wbase[c][s])
        send('{op: OP_MAC, mode: mode, w_row: 8'(wbase[c][s]), in_base: 12'(gbase[c]),
               in_len: 12'(glen[c]), dc_off: 4'(dc), relu: relu});
    send('{op: OP_DRAIN, mode: mode, w_row: 0, in_base: 0, in_len: 0, dc_off: 4'(dc), relu: relu});
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    while (out_valid) @(negedge clk);
    repeat (4) @(negedge clk);
    checks++;
    if (int'(perf_vec) - v0 != exp_vec) begin
      failures++;
      $display("mode %0d: array took %0d vectors, expected %0d", mode, int'(perf_vec) - v0, exp_vec);
    end
    for (int k = 0; k < KC; k++) for (int y = 0; y < TILE; y++) for (int x = 0; x < TILE; x++) begin
      longint e = expected(0, mode, dc, k, y, x, relu);
      if (relu && expected(0, mode, dc, k, y, x, 1'b0) < 0) n_relu_clamp++;
      checks++;
      if (longint'(got[k][y][x]) != e) begin
        failures++;
        if (failures < 10) $display("mode %0d k%0d y%0d x%0d: got %0d expected %0d", mode, k, y, x, got[k][y][x], e);
      end
    end
    modes_run[mode]++;
    $display("mode %0d done at cycle %0d: vectors %0d stall %0d conflict %0d merge %0d",
             mode, cycles, perf_vec, perf_stall, perf_conflict, perf_merge);
  endtask

  initial begin
    cmd_valid = 0; cmd = '0; wb_we = 0; wb_waddr = 0; wb_wdata = '0;
    gb_we = 0; gb_waddr = 0; gb_wdata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_layer(MODE_CONV1, 3, TILE + 2, 0, 1'b1);
    run_layer(MODE_CONV2, 3, 2 * TILE + 1, 0, 1'b0);
    run_layer(MODE_DECONV, 4, TILE / 2 + 2, 3, 1'b1);
    checks++; if (dup != 0)       begin failures++; $display("duplicate outputs: %0d", dup); end
    checks++; if (bad_group != 0) begin failures++; $display("wrong group tags: %0d", bad_group); end
    for (int m = 0; m < 3; m++) begin
      checks++; if (modes_run[m] == 0) begin failures++; $display("mode %0d never ran", m); end
    end
    checks++; if (perf_stall == 0)    begin failures++; $display("no conflict stall happened"); end
    checks++; if (perf_conflict == 0) begin failures++; $display("no same-cycle conflict happened"); end
    checks++; if (perf_merge == 0)    begin failures++; $display("no conflict-buffer merge happened"); end
    checks++; if (n_relu_clamp == 0)  begin failures++; $display("ReLU never clamped"); end
    checks++; if (n_backpressure == 0) begin failures++; $display("output never back-pressured"); end
    $display("events: stall=%0d conflict=%0d merge=%0d relu=%0d backpressure=%0d",
             perf_stall, perf_conflict, perf_merge, n_relu_clamp, n_backpressure);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
