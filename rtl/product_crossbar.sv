// product_crossbar: scatters the N_PROD products of one cycle to the
// accumulator banks.
//
// Each product carries a bank number from the chess mapping. Bank b receives,
// on its N_PROD lanes, every product whose bank number is b; lanes of other
// banks' products are marked invalid. Lane order is kept, so the conflict
// detector of a bank sees its products in product order. Purely
// combinational: one demultiplexer per product, as in the PE drawing.
module product_crossbar
  import sparse_stereo_pkg::*;
#(
  parameter int unsigned ADDR_W = 7
) (
  input  logic                     in_valid [N_PROD],
  input  logic [BANK_W-1:0]        in_bank  [N_PROD],
  input  logic [ADDR_W-1:0]        in_addr  [N_PROD],
  input  logic signed [PROD_W-1:0] in_data  [N_PROD],
  output logic                     out_valid [N_BANKS][N_PROD],
  output logic [ADDR_W-1:0]        out_addr  [N_BANKS][N_PROD],
  output logic signed [PROD_W-1:0] out_data  [N_BANKS][N_PROD]
);
  always_comb begin
    for (int b = 0; b < N_BANKS; b++) begin
      for (int p = 0; p < N_PROD; p++) begin
        out_valid[b][p] = in_valid[p] && (32'(in_bank[p]) == b);
        out_addr[b][p]  = in_addr[p];
        out_data[b][p]  = in_data[p];
      end
    end
  end
endmodule
