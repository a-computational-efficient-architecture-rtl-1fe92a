// stereo_accel_top: sparse stereo-network accelerator, NUM_PE processing
// elements with F_NUM x I_NUM = 16 multipliers each (64 x 16 = 1024 MACs).
//
// Every PE works on its own tile of the activation plane: it owns a group
// buffer holding that tile's compressed input vectors and produces the
// compressed output of the same tile. The weights are the same for all tiles,
// so weight-buffer writes and commands are broadcast to every PE. A command
// is accepted only when all PEs are ready for it, so the PEs stay in step at
// command boundaries. The compressed outputs of all PEs are merged round-robin
// onto one port towards DRAM, tagged with the PE number.
//
// Interfaces:
//   cmd_*   one pe_cmd_t per handshake (OP_MAC: weight set x input range,
//           OP_DRAIN: ReLU, compress and clear the accumulators)
//   wb_*    weight-buffer write, broadcast (one row of F_NUM weights per cycle)
//   gb_*    group-buffer write into PE gb_pe (one input vector per cycle)
//   out_*   compressed output vectors, valid/ready, with the source PE
//   perf_*  per-PE event counters (vectors, stall cycles, conflict cycles,
//           merged clusters)
// The 1024 multipliers, 32 banks per PE and SCNN-style tile-per-PE
// organisation follow the document; the number of PEs is 1024 / 16, and the
// command, load and output ports are this design's choices.
module stereo_accel_top
  import sparse_stereo_pkg::*;
#(
  parameter int unsigned NUM_PE   = 64,
  parameter int unsigned TILE_W   = 16,
  parameter int unsigned TILE_H   = 16,
  parameter int unsigned KC       = 16,
  parameter int unsigned WB_DEPTH = 256,
  parameter int unsigned GB_DEPTH = 512,
  localparam int unsigned PE_W    = (NUM_PE > 1) ? $clog2(NUM_PE) : 1,
  localparam int unsigned WB_AW   = $clog2(WB_DEPTH),
  localparam int unsigned GB_AW   = $clog2(GB_DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cmd_valid,
  output logic             cmd_ready,
  input  pe_cmd_t          cmd,
  input  logic             wb_we,
  input  logic [WB_AW-1:0] wb_waddr,
  input  weight_row_t      wb_wdata,
  input  logic             gb_we,
  input  logic [PE_W-1:0]  gb_pe,
  input  logic [GB_AW-1:0] gb_waddr,
  input  act_vec_t         gb_wdata,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [PE_W-1:0]  out_pe,
  output out_vec_t         out_data,
  output logic             busy,
  output logic [31:0]      perf_vec      [NUM_PE],
  output logic [31:0]      perf_stall    [NUM_PE],
  output logic [31:0]      perf_conflict [NUM_PE],
  output logic [31:0]      perf_merge    [NUM_PE]
);
  logic [NUM_PE-1:0] pe_cmd_ready, pe_busy, pe_out_valid, pe_out_ready;
  out_vec_t          pe_out_data [NUM_PE];

  assign cmd_ready = &pe_cmd_ready;
  assign busy      = |pe_busy;

  for (genvar n = 0; n < NUM_PE; n++) begin : g_pe
    logic             gb_re;
    logic [GB_AW-1:0] gb_raddr;
    act_vec_t         gb_rdata;

    group_buffer #(.DEPTH(GB_DEPTH)) u_gbuf (
      .clk,
      .we(gb_we && gb_pe == PE_W'(n)), .waddr(gb_waddr), .wdata(gb_wdata),
      .re(gb_re), .raddr(gb_raddr), .rdata(gb_rdata)
    );

    pe #(
      .TILE_W(TILE_W), .TILE_H(TILE_H), .KC(KC),
      .WB_DEPTH(WB_DEPTH), .GB_DEPTH(GB_DEPTH)
    ) u_pe (
      .clk, .rst_n,
      .cmd_valid(cmd_valid && cmd_ready), .cmd_ready(pe_cmd_ready[n]), .cmd,
      .wb_we, .wb_waddr, .wb_wdata,
      .gb_re, .gb_raddr, .gb_rdata,
      .out_valid(pe_out_valid[n]), .out_ready(pe_out_ready[n]), .out_data(pe_out_data[n]),
      .busy(pe_busy[n]),
      .perf_vec(perf_vec[n]), .perf_stall(perf_stall[n]),
      .perf_conflict(perf_conflict[n]), .perf_merge(perf_merge[n])
    );
  end

  out_arbiter #(.T(out_vec_t), .N(NUM_PE)) u_arb (
    .clk, .rst_n,
    .req_valid(pe_out_valid), .req_ready(pe_out_ready), .req_data(pe_out_data),
    .out_valid, .out_ready, .out_data, .out_src(out_pe)
  );
endmodule
