// tb_stereo_accel_top: end-to-end test of the accelerator with NPE PEs.
//
// Each PE gets its own random sparse tile; weights and commands are shared.
// Three layers are run (unit-stride 3x3 convolution with ReLU, stride-2 3x3
// convolution, stride-2 4x4 deconvolution with ReLU), each with two input
// channels and 16 output channels. Per input channel the PEs' vector lists
// are padded with empty vectors to a common length, because commands are
// broadcast. The merged output stream, throttled at random, is sorted by its
// PE tag and compared pixel by pixel with the gather-form reference model.
// Also checks the number of vectors each PE multiplied, and counts stalls,
// same-cycle conflicts, buffer merges, ReLU clamping, output back-pressure
// and arbitration between several PEs with output pending, each of which
// must happen at least once.
module tb_stereo_accel_top;
  import sparse_stereo_pkg::*;
  import stereo_ref_pkg::*;

  localparam int NPE  = 4;
  localparam int TILE = 16;
  localparam int KC   = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cmd_valid, cmd_ready;
  pe_cmd_t cmd;
  logic wb_we;
  logic [7:0] wb_waddr;
  weight_row_t wb_wdata;
  logic gb_we;
  logic [$clog2(NPE)-1:0] gb_pe, out_pe;
  logic [8:0] gb_waddr;
  act_vec_t gb_wdata;
  logic out_valid, out_ready;
  out_vec_t out_data;
  logic busy;
  logic [31:0] perf_vec [NPE], perf_stall [NPE], perf_conflict [NPE], perf_merge [NPE];

  stereo_accel_top #(.NUM_PE(NPE)) dut (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd, .wb_we, .wb_waddr, .wb_wdata,
    .gb_we, .gb_pe, .gb_waddr, .gb_wdata, .out_valid, .out_ready, .out_pe, .out_data,
    .busy, .perf_vec, .perf_stall, .perf_conflict, .perf_merge);

  int checks = 0, failures = 0;
  int cycles = 0;
  int n_backpressure = 0, n_relu_clamp = 0, n_contend = 0;
  int modes_run [3] = '{0, 0, 0};
  always @(posedge clk) cycles++;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int got [NPE][KC][TILE][TILE];
  bit seen [NPE][KC][TILE][TILE];
  int dup = 0, bad_group = 0;
  always @(posedge clk) begin
    out_ready <= ($urandom_range(0, 3) != 0);
    if (rst_n && out_valid && !out_ready) n_backpressure++;
    if (rst_n && $countones(dut.pe_out_valid) > 1) n_contend++;
    if (rst_n && out_valid && out_ready) begin
      for (int i = 0; i < I_NUM; i++) if (out_data.a[i].valid) begin
        automatic int p = out_pe, k = out_data.a[i].k, y = out_data.a[i].y, x = out_data.a[i].x;
        if (seen[p][k][y][x]) dup++;
        seen[p][k][y][x] = 1;
        got[p][k][y][x] = out_data.a[i].value;
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
    int v0 [NPE];
    gen_inputs(NPE, 2, in_sz, in_sz, 50);
    gen_weights(2, KC, ksz, 25);
    for (int c = 0; c < 2; c++) begin
      pack_weights(c, mode, rows);
      foreach (rows[r]) begin
        if (r % 4 == 0) wbase[c].push_back(waddr);
        @(negedge clk); wb_we = 1; wb_waddr = 8'(waddr); wb_wdata = rows[r];
        waddr++;
      end
      @(negedge clk); wb_we = 0;
      glen[c] = 0;
      for (int p = 0; p < NPE; p++) begin
        pack_inputs(p, c, mode, vq);
        if (vq.size() > glen[c]) glen[c] = vq.size();
      end
      gbase[c] = gaddr;
      for (int p = 0; p < NPE; p++) begin
        pack_inputs(p, c, mode, vq);
        while (vq.size() < glen[c]) vq.push_back('0);
        foreach (vq[j]) begin
          @(negedge clk); gb_we = 1; gb_pe = ($clog2(NPE))'(p); gb_waddr = 9'(gaddr + j); gb_wdata = vq[j];
        end
      end
      @(negedge clk); gb_we = 0;
      gaddr += glen[c];
      for (int s = 0; s < wbase[c].size(); s++) begin
        if (mode == MODE_CONV2) exp_vec += glen[c];
        else for (int r = 0; r < 4; r++) if (rows[s*4+r] != '0) exp_vec += glen[c];
      end
    end
    for (int p = 0; p < NPE; p++)
      for (int k = 0; k < KC; k++) for (int y = 0; y < TILE; y++) for (int x = 0; x < TILE; x++) begin
        seen[p][k][y][x] = 0; got[p][k][y][x] = 0;
      end
    for (int p = 0; p < NPE; p++) v0[p] = perf_vec[p];
    for (int c = 0; c < 2; c++)
      foreach (wbase[c][s])
        send('{op: OP_MAC, mode: mode, w_row: 8'(wbase[c][s]), in_base: 12'(gbase[c]),
               in_len: 12'(glen[c]), dc_off: 4'(dc), relu: relu});
    send('{op: OP_DRAIN, mode: mode, w_row: 0, in_base: 0, in_len: 0, dc_off: 4'(dc), relu: relu});
    @(negedge clk);
    while (!cmd_ready || busy) @(negedge clk);
    while (out_valid) @(negedge clk);
    repeat (4) @(negedge clk);
    for (int p = 0; p < NPE; p++) begin
      checks++;
      if (int'(perf_vec[p]) - v0[p] != exp_vec) begin
        failures++;
        $display("PE %0d mode %0d: %0d vectors, expected %0d", p, mode, int'(perf_vec[p]) - v0[p], exp_vec);
      end
      for (int k = 0; k < KC; k++) for (int y = 0; y < TILE; y++) for (int x = 0; x < TILE; x++) begin
        longint e = expected(p, mode, dc, k, y, x, relu);
        if (relu && expected(p, mode, dc, k, y, x, 1'b0) < 0) n_relu_clamp++;
        checks++;
        if (longint'(got[p][k][y][x]) != e) begin
          failures++;
          if (failures < 10) $display("PE %0d mode %0d k%0d y%0d x%0d: got %0d expected %0d",
                                      p, mode, k, y, x, got[p][k][y][x], e);
        end
      end
    end
    modes_run[mode]++;
    $display("mode %0d done at cycle %0d", mode, cycles);
  endtask

  initial begin
    int st = 0, cf = 0, mg = 0;
    cmd_valid = 0; cmd = '0; wb_we = 0; wb_waddr = 0; wb_wdata = '0;
    gb_we = 0; gb_pe = 0; gb_waddr = 0; gb_wdata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_layer(MODE_CONV1, 3, TILE + 2, 0, 1'b1);
    run_layer(MODE_CONV2, 3, 2 * TILE + 1, 0, 1'b0);
    run_layer(MODE_DECONV, 4, TILE / 2 + 2, 3, 1'b1);
    for (int p = 0; p < NPE; p++) begin
      st += perf_stall[p]; cf += perf_conflict[p]; mg += perf_merge[p];
    end
    checks++; if (dup != 0)       begin failures++; $display("duplicate outputs: %0d", dup); end
    checks++; if (bad_group != 0) begin failures++; $display("wrong group tags: %0d", bad_group); end
    for (int m = 0; m < 3; m++) begin
      checks++; if (modes_run[m] == 0) begin failures++; $display("mode %0d never ran", m); end
    end
    checks++; if (st == 0) begin failures++; $display("no conflict stall happened"); end
    checks++; if (cf == 0) begin failures++; $display("no same-cycle conflict happened"); end
    checks++; if (mg == 0) begin failures++; $display("no conflict-buffer merge happened"); end
    checks++; if (n_relu_clamp == 0)   begin failures++; $display("ReLU never clamped"); end
    checks++; if (n_backpressure == 0) begin failures++; $display("output never back-pressured"); end
    checks++; if (NPE > 1 && n_contend == 0) begin failures++; $display("no output arbitration happened"); end
    $display("events: stall=%0d conflict=%0d merge=%0d relu=%0d backpressure=%0d contention=%0d cycles=%0d",
             st, cf, mg, n_relu_clamp, n_backpressure, n_contend, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
