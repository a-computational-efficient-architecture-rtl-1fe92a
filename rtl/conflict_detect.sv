// conflict_detect: conflict detection unit of one accumulator bank.
//
// The bank receives up to N_PROD products per accepted cycle, each with a
// word address. Products to the same address can be added before they reach
// the bank; products to different addresses are a same-cycle conflict and
// have to be written one after the other. The unit holds the products of one
// cycle in a pending set and each cycle forms one cluster:
//   - the first-valid-index detector picks the lowest pending lane,
//   - the identical-address detector marks every pending lane whose address
//     equals that lane's address,
//   - the marked data are selected and summed,
// and the cluster (address, sum) is handed to the conflict buffer. The
// marked lanes then leave the pending set.
//
// Timing: ready is high when the pending set will be empty at the end of
// this cycle; the PE loads a new product set into every bank (load) only when
// all banks are ready, so a bank with k distinct addresses holds the array
// for k-1 cycles. A cluster leaves only when cl_ready is high. The
// detector/selector/adder structure follows the conflict unit drawing; one
// cluster per cycle and the ready rule are this design's choices.
module conflict_detect
  import sparse_stereo_pkg::*;
#(
  parameter int unsigned ADDR_W = 7
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     load,
  input  logic                     in_valid [N_PROD],
  input  logic [ADDR_W-1:0]        in_addr  [N_PROD],
  input  logic signed [PROD_W-1:0] in_data  [N_PROD],
  output logic                     ready,
  output logic                     cl_valid,
  input  logic                     cl_ready,
  output logic [ADDR_W-1:0]        cl_addr,
  output logic signed [ACC_W-1:0]  cl_sum,
  output logic                     idle,
  output logic                     conflict    // more than one address pending
);
  logic [N_PROD-1:0]        pend_v;
  logic [ADDR_W-1:0]        pend_addr [N_PROD];
  logic signed [PROD_W-1:0] pend_data [N_PROD];

  logic [$clog2(N_PROD)-1:0] first;
  logic [N_PROD-1:0]         same;
  logic [N_PROD-1:0]         rest;
  logic                      emit;

  // first valid index detector
  always_comb begin
    first = '0;
    for (int p = N_PROD - 1; p >= 0; p--)
      if (pend_v[p]) first = ($clog2(N_PROD))'(p);
  end

  // identical address detector, selection and adder
  always_comb begin
    cl_addr = pend_addr[first];
    cl_sum  = '0;
    for (int p = 0; p < N_PROD; p++) begin
      same[p] = pend_v[p] && (pend_addr[p] == cl_addr);
      if (same[p]) cl_sum = cl_sum + ACC_W'(pend_data[p]);
    end
    rest     = pend_v & ~same;
    cl_valid = |pend_v;
    emit     = cl_valid && cl_ready;
    ready    = !cl_valid || (emit && rest == '0);
    idle     = !cl_valid;
    conflict = (rest != '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_v <= '0;
    end else if (load && ready) begin
      for (int p = 0; p < N_PROD; p++) pend_v[p] <= in_valid[p];
    end else if (emit) begin
      pend_v <= rest;
    end
  end

  always_ff @(posedge clk) begin
    if (load && ready) begin
      pend_addr <= in_addr;
      pend_data <= in_data;
    end
  end

  a_load_when_ready: assert property (@(posedge clk) disable iff (!rst_n) load |-> ready);
endmodule
