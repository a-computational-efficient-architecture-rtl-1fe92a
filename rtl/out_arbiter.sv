// out_arbiter: round-robin merge of the PEs' compressed output streams onto
// the single write port towards DRAM.
//
// Each PE offers a word with req_valid; one is granted per cycle when
// out_ready is high. The search starts one past the last granted PE, so a busy
// PE cannot starve the others. out_src names the PE the word came from (the
// words carry only tile-local coordinates). Combinational grant, registered
// priority pointer. The document leaves the DRAM interface out of its scope;
// this merge is this design's choice.
module out_arbiter #(
  parameter type         T = logic [7:0],
  parameter int unsigned N = 64,
  localparam int unsigned SW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  req_valid,
  output logic [N-1:0]  req_ready,
  input  T              req_data [N],
  output logic          out_valid,
  input  logic          out_ready,
  output T              out_data,
  output logic [SW-1:0] out_src
);
  logic [SW-1:0] last;
  logic          found;

  always_comb begin
    found   = 1'b0;
    out_src = '0;
    for (int j = 1; j <= N; j++) begin
      automatic int c = (int'(last) + j) % N;
      if (!found && req_valid[c]) begin
        found   = 1'b1;
        out_src = SW'(c);
      end
    end
    out_valid = found;
    out_data  = req_data[out_src];
    req_ready = '0;
    if (found && out_ready) req_ready[out_src] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     last <= SW'(N - 1);
    else if (out_valid && out_ready) last <= out_src;
  end

  a_one_grant: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(req_ready));
endmodule
