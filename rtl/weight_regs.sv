// weight_regs: the stationary weight set of a PE.
//
// Holds four rows of F_NUM weight records, one row per checkerboard group, and
// hands one row per cycle to the multiplier array. In stride-2 convolution the
// row is chosen by the group of the activation vector being multiplied, so a
// weight only ever meets activations of its own group (group-to-group instead
// of all-to-all). In unit-stride convolution and in deconvolution every
// weight meets every activation; there the controller walks the four rows one
// pass at a time and the row index travels with each activation vector.
//
// Rows are loaded one per cycle (load, load_row, load_data) while the array is
// idle. Selection is combinational. Four groups of four weights in registers
// follow the stride-2 dataflow description; reusing the same rows as four
// successive passes in the other modes is this design's choice.
module weight_regs
  import sparse_stereo_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [GRP_W-1:0] load_row,
  input  weight_row_t      load_data,
  input  conv_mode_e       mode,
  input  logic [GRP_W-1:0] act_group,   // group of the activation vector
  input  logic [GRP_W-1:0] pass_row,    // row of the current pass
  output weight_row_t      sel
);
  weight_row_t rows [N_GROUPS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < N_GROUPS; r++) rows[r] <= '0;
    end else if (load) begin
      rows[load_row] <= load_data;
    end
  end

  always_comb begin
    if (mode == MODE_CONV2) sel = rows[act_group];
    else                    sel = rows[pass_row];
  end
endmodule
