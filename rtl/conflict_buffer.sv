// conflict_buffer: queue of clusters waiting for one accumulator bank.
//
// Clusters from the conflict detector enter at the tail and leave from the
// head towards the bank's read-modify-write engine. A single-port bank needs
// two cycles for one read and store, so clusters pile up here instead of
// stalling the multipliers. When an arriving cluster has the address of a
// cluster already queued (and not leaving this cycle), its sum is added into
// that entry instead of taking a new one, which also absorbs adjacent-cycle
// conflicts. in_ready is high when the queue has room, a word leaves this
// cycle, or the arriving address can be merged.
//
// The buffer itself follows the conflict unit description; its depth and the
// merge rule are this design's choices.
module conflict_buffer
  import sparse_stereo_pkg::*;
#(
  parameter int unsigned ADDR_W = 7,
  parameter int unsigned DEPTH  = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic [ADDR_W-1:0]       in_addr,
  input  logic signed [ACC_W-1:0] in_sum,
  output logic                    out_valid,
  input  logic                    out_pop,
  output logic [ADDR_W-1:0]       out_addr,
  output logic signed [ACC_W-1:0] out_sum,
  output logic                    empty,
  output logic                    merged     // an arriving cluster was merged
);
  localparam int unsigned CW = $clog2(DEPTH + 1);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [ADDR_W-1:0]       e_addr [DEPTH];
  logic signed [ACC_W-1:0] e_sum  [DEPTH];
  logic [CW-1:0]           count;

  logic                    pop, match;
  logic [CW-1:0]           match_idx;

  assign out_valid = (count != '0);
  assign out_addr  = e_addr[0];
  assign out_sum   = e_sum[0];
  assign empty     = (count == '0);
  assign pop       = out_valid && out_pop;

  always_comb begin
    match     = 1'b0;
    match_idx = '0;
    for (int j = DEPTH - 1; j >= 0; j--) begin
      if (CW'(j) < count && !(pop && j == 0) && e_addr[j] == in_addr) begin
        match     = 1'b1;
        match_idx = CW'(j);
      end
    end
    in_ready = (count < CW'(DEPTH)) || pop || match;
    merged   = in_valid && match;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      for (int j = 0; j < DEPTH; j++) begin
        e_addr[j] <= '0;
        e_sum[j]  <= '0;
      end
    end else begin
      automatic logic [ADDR_W-1:0]       na [DEPTH];
      automatic logic signed [ACC_W-1:0] ns [DEPTH];
      automatic logic [CW-1:0]           nc;
      na = e_addr;
      ns = e_sum;
      nc = count;
      if (pop) begin
        for (int j = 0; j < DEPTH - 1; j++) begin
          na[j] = na[j+1];
          ns[j] = ns[j+1];
        end
        nc = nc - 1'b1;
      end
      if (in_valid && in_ready) begin
        if (match) begin
          automatic logic [CW-1:0] t = pop ? match_idx - 1'b1 : match_idx;
          ns[PW'(t)] = ns[PW'(t)] + in_sum;
        end else begin
          na[PW'(nc)] = in_addr;
          ns[PW'(nc)] = in_sum;
          nc = nc + 1'b1;
        end
      end
      e_addr <= na;
      e_sum  <= ns;
      count  <= nc;
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) count <= CW'(DEPTH));
endmodule
