// bank_slice: one accumulator bank together with its conflict unit.
//
// Chains the conflict detection unit (clusters the products that target
// this bank in one cycle), the conflict buffer (queues clusters and merges
// equal addresses) and the single-port accumulator bank (two-cycle read and
// store). ready tells the PE whether the bank can take a new product set this
// cycle; idle tells the controller that nothing is left in flight, so the bank
// may be drained. conflict and merged are event flags for performance counting.
// Putting a conflict unit in front of every accumulator bank follows the PE
// drawing.
module bank_slice
  import sparse_stereo_pkg::*;
#(
  parameter int unsigned DEPTH    = 128,
  parameter int unsigned CB_DEPTH = 4,
  localparam int unsigned ADDR_W  = $clog2(DEPTH)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     load,
  input  logic                     in_valid [N_PROD],
  input  logic [ADDR_W-1:0]        in_addr  [N_PROD],
  input  logic signed [PROD_W-1:0] in_data  [N_PROD],
  output logic                     ready,
  input  logic                     clr,
  input  logic                     drn,
  input  logic [ADDR_W-1:0]        ctl_addr,
  output logic                     drn_valid,
  output logic signed [ACC_W-1:0]  drn_data,
  output logic                     idle,
  output logic                     conflict,
  output logic                     merged
);
  logic                    cl_valid, cl_ready;
  logic [ADDR_W-1:0]       cl_addr;
  logic signed [ACC_W-1:0] cl_sum;
  logic                    det_idle;

  logic                    q_valid, q_pop, q_empty;
  logic [ADDR_W-1:0]       q_addr;
  logic signed [ACC_W-1:0] q_sum;
  logic                    bank_busy;

  conflict_detect #(.ADDR_W(ADDR_W)) u_detect (
    .clk, .rst_n, .load,
    .in_valid, .in_addr, .in_data,
    .ready,
    .cl_valid, .cl_ready, .cl_addr, .cl_sum,
    .idle(det_idle), .conflict
  );

  conflict_buffer #(.ADDR_W(ADDR_W), .DEPTH(CB_DEPTH)) u_buffer (
    .clk, .rst_n,
    .in_valid(cl_valid), .in_ready(cl_ready), .in_addr(cl_addr), .in_sum(cl_sum),
    .out_valid(q_valid), .out_pop(q_pop), .out_addr(q_addr), .out_sum(q_sum),
    .empty(q_empty), .merged
  );

  acc_bank #(.DEPTH(DEPTH)) u_bank (
    .clk, .rst_n,
    .upd_valid(q_valid), .upd_pop(q_pop), .upd_addr(q_addr), .upd_sum(q_sum),
    .clr, .drn, .ctl_addr,
    .drn_valid, .drn_data,
    .busy(bank_busy)
  );

  assign idle = det_idle && q_empty && !bank_busy;
endmodule
