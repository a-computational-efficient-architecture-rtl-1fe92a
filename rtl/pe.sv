// pe: one processing element of the sparse stereo accelerator.
//
// Data path, in pipeline order:
//   group buffer (outside the PE) -> input FIFO -> weight registers select a
//   row of F_NUM weights -> 4 x 4 multiplier array and coordinate computation
//   (chess mapping) -> product stage register -> crossbar -> 32 bank slices
//   (conflict detection, conflict buffer, single-port accumulator bank)
//   -> drain -> ReLU/compression -> compress buffer -> out port (to DRAM).
// The weight buffer with its indices is inside the PE and is written from
// DRAM through the wb_* port. pe_controller sequences everything.
//
// The product stage hands its 16 products to all banks at once, and only when
// every bank is ready; a bank that got products for several addresses in one
// cycle holds the stage until its conflict detector has separated them. Such
// cycles are counted in perf_stall. perf_vec counts activation vectors
// multiplied, perf_conflict cycles in which some bank saw a same-cycle
// conflict, perf_merge clusters merged inside a conflict buffer.
//
// Timing: the group buffer is read synchronously through gb_re / gb_raddr with
// gb_rdata valid one cycle later. The block structure follows the PE drawing;
// FIFO depths, the product stage register and the counters are this design's
// choices.
module pe
  import sparse_stereo_pkg::*;
#(
  parameter int unsigned TILE_W    = 16,
  parameter int unsigned TILE_H    = 16,
  parameter int unsigned KC        = 16,
  parameter int unsigned WB_DEPTH  = 256,
  parameter int unsigned GB_DEPTH  = 512,
  parameter int unsigned IF_DEPTH  = 4,
  parameter int unsigned CB_DEPTH  = 4,
  parameter int unsigned OB_DEPTH  = 8,
  localparam int unsigned BLOCKS   = (TILE_W / BLK_W) * (TILE_H / BLK_H),
  localparam int unsigned ACC_DEPTH = KC * BLOCKS,
  localparam int unsigned ADDR_W   = $clog2(ACC_DEPTH),
  localparam int unsigned WB_AW    = $clog2(WB_DEPTH),
  localparam int unsigned GB_AW    = $clog2(GB_DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cmd_valid,
  output logic             cmd_ready,
  input  pe_cmd_t          cmd,
  // weight buffer write (from DRAM)
  input  logic             wb_we,
  input  logic [WB_AW-1:0] wb_waddr,
  input  weight_row_t      wb_wdata,
  // group buffer read
  output logic             gb_re,
  output logic [GB_AW-1:0] gb_raddr,
  input  act_vec_t         gb_rdata,
  // compressed output (to DRAM)
  output logic             out_valid,
  input  logic             out_ready,
  output out_vec_t         out_data,
  output logic             busy,
  output logic [31:0]      perf_vec,
  output logic [31:0]      perf_stall,
  output logic [31:0]      perf_conflict,
  output logic [31:0]      perf_merge
);
  localparam int unsigned IF_CW = $clog2(IF_DEPTH + 1);

  typedef struct packed {
    logic [GRP_W-1:0] row;
    act_vec_t         vec;
  } if_word_t;

  // ---------------- controller ----------------
  logic              wb_re, wr_load;
  logic [WB_AW-1:0]  wb_raddr;
  logic [GRP_W-1:0]  wr_row, if_row;
  weight_row_t       wb_rdata;
  logic              if_push;
  logic [IF_CW-1:0]  if_count;
  logic              mac_empty, banks_idle, blk_ready;
  logic              acc_clr, acc_drn;
  logic [ADDR_W-1:0] acc_addr;
  conv_mode_e        mode;
  logic [3:0]        dc_off;
  logic              relu;

  pe_controller #(
    .ACC_DEPTH(ACC_DEPTH), .WB_DEPTH(WB_DEPTH), .GB_DEPTH(GB_DEPTH), .IF_DEPTH(IF_DEPTH)
  ) u_ctrl (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd,
    .wb_re, .wb_raddr, .wr_load, .wr_row, .wr_data(wb_rdata),
    .gb_re, .gb_raddr, .if_push, .if_row, .if_count, .mac_empty,
    .banks_idle, .blk_ready, .acc_clr, .acc_drn, .acc_addr,
    .mode, .dc_off, .relu, .busy
  );

  weight_buffer #(.DEPTH(WB_DEPTH)) u_wbuf (
    .clk, .we(wb_we), .waddr(wb_waddr), .wdata(wb_wdata),
    .re(wb_re), .raddr(wb_raddr), .rdata(wb_rdata)
  );

  // ---------------- input FIFO ----------------
  if_word_t if_in, if_head;
  logic     if_valid, if_pop, if_in_ready;

  assign if_in = '{row: if_row, vec: gb_rdata};

  sync_fifo #(.T(if_word_t), .DEPTH(IF_DEPTH)) u_ififo (
    .clk, .rst_n,
    .in_valid(if_push), .in_ready(if_in_ready), .in_data(if_in),
    .out_valid(if_valid), .out_ready(if_pop), .out_data(if_head),
    .count(if_count)
  );

  // ---------------- weights, multipliers, coordinates ----------------
  weight_row_t              wsel;
  logic signed [PROD_W-1:0] prod   [N_PROD];
  logic                     c_valid [N_PROD];
  logic [BANK_W-1:0]        c_bank  [N_PROD];
  logic [ADDR_W-1:0]        c_addr  [N_PROD];

  weight_regs u_wregs (
    .clk, .rst_n, .load(wr_load), .load_row(wr_row), .load_data(wb_rdata),
    .mode, .act_group(if_head.vec.group), .pass_row(if_head.row), .sel(wsel)
  );

  multiplier_array u_mul (.w(wsel), .a(if_head.vec.a), .prod);

  coord_compute #(.TILE_W(TILE_W), .TILE_H(TILE_H), .KC(KC)) u_coord (
    .mode, .dc_off, .w(wsel), .a(if_head.vec.a),
    .valid(c_valid), .bank(c_bank), .addr(c_addr)
  );

  // ---------------- product stage ----------------
  logic                     ps_v;
  logic                     ps_valid [N_PROD];
  logic [BANK_W-1:0]        ps_bank  [N_PROD];
  logic [ADDR_W-1:0]        ps_addr  [N_PROD];
  logic signed [PROD_W-1:0] ps_data  [N_PROD];
  logic                     all_ready;
  logic                     bank_load;

  assign bank_load = ps_v && all_ready;
  assign if_pop    = if_valid && (!ps_v || all_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ps_v <= 1'b0;
      for (int p = 0; p < N_PROD; p++) ps_valid[p] <= 1'b0;
    end else if (if_pop) begin
      ps_v     <= 1'b1;
      ps_valid <= c_valid;
    end else if (all_ready) begin
      ps_v <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (if_pop) begin
      ps_bank <= c_bank;
      ps_addr <= c_addr;
      ps_data <= prod;
    end
  end

  assign mac_empty = !if_valid && !ps_v;

  // ---------------- crossbar and banks ----------------
  logic                     x_valid [N_BANKS][N_PROD];
  logic [ADDR_W-1:0]        x_addr  [N_BANKS][N_PROD];
  logic signed [PROD_W-1:0] x_data  [N_BANKS][N_PROD];

  product_crossbar #(.ADDR_W(ADDR_W)) u_xbar (
    .in_valid(ps_valid), .in_bank(ps_bank), .in_addr(ps_addr), .in_data(ps_data),
    .out_valid(x_valid), .out_addr(x_addr), .out_data(x_data)
  );

  logic [N_BANKS-1:0]      b_ready, b_idle, b_conflict, b_merged, b_drn_valid;
  logic signed [ACC_W-1:0] b_drn_data [N_BANKS];

  for (genvar b = 0; b < N_BANKS; b++) begin : g_bank
    bank_slice #(.DEPTH(ACC_DEPTH), .CB_DEPTH(CB_DEPTH)) u_slice (
      .clk, .rst_n,
      .load(bank_load),
      .in_valid(x_valid[b]), .in_addr(x_addr[b]), .in_data(x_data[b]),
      .ready(b_ready[b]),
      .clr(acc_clr), .drn(acc_drn), .ctl_addr(acc_addr),
      .drn_valid(b_drn_valid[b]), .drn_data(b_drn_data[b]),
      .idle(b_idle[b]), .conflict(b_conflict[b]), .merged(b_merged[b])
    );
  end

  assign all_ready  = &b_ready;
  assign banks_idle = &b_idle;

  // ---------------- drain: ReLU, compression, compress buffer ----------------
  logic [ADDR_W-1:0] drn_addr_q;
  logic              cr_valid, cr_ready;
  out_vec_t          cr_data;
  logic [$clog2(OB_DEPTH+1)-1:0] ob_count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) drn_addr_q <= '0;
    else if (acc_drn) drn_addr_q <= acc_addr;
  end

  compress_relu #(.TILE_W(TILE_W), .TILE_H(TILE_H), .KC(KC)) u_compress (
    .clk, .rst_n, .relu,
    .blk_valid(b_drn_valid[0]), .blk_ready, .blk_addr(drn_addr_q), .blk_data(b_drn_data),
    .out_valid(cr_valid), .out_ready(cr_ready), .out_data(cr_data)
  );

  sync_fifo #(.T(out_vec_t), .DEPTH(OB_DEPTH)) u_obuf (
    .clk, .rst_n,
    .in_valid(cr_valid), .in_ready(cr_ready), .in_data(cr_data),
    .out_valid, .out_ready, .out_data,
    .count(ob_count)
  );

  // ---------------- performance counters ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      perf_vec      <= '0;
      perf_stall    <= '0;
      perf_conflict <= '0;
      perf_merge    <= '0;
    end else begin
      if (if_pop)               perf_vec      <= perf_vec + 1'b1;
      if (ps_v && !all_ready)   perf_stall    <= perf_stall + 1'b1;
      if (|b_conflict)          perf_conflict <= perf_conflict + 1'b1;
      perf_merge <= perf_merge + 32'($countones(b_merged));
    end
  end

  // the input FIFO never overflows: the controller reserves room for every read
  a_fifo_room: assert property (@(posedge clk) disable iff (!rst_n) if_push |-> if_in_ready);
endmodule
