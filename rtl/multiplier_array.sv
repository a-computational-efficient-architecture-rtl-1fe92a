// multiplier_array: F_NUM x I_NUM Cartesian-product multipliers.
//
// Every cycle each of the F_NUM selected non-zero weights is multiplied with
// each of the I_NUM non-zero activations of the current vector, giving
// N_PROD = 16 products. Product p = f*I_NUM + i pairs weight f with
// activation i. Purely combinational; signed DATA_W x DATA_W -> PROD_W.
// The Cartesian-product organisation follows the architecture description,
// the value widths are this design's choice.
module multiplier_array
  import sparse_stereo_pkg::*;
(
  input  weight_row_t              w,
  input  act_t [I_NUM-1:0]         a,
  output logic signed [PROD_W-1:0] prod [N_PROD]
);
  always_comb begin
    for (int f = 0; f < F_NUM; f++)
      for (int i = 0; i < I_NUM; i++)
        prod[f*I_NUM+i] = PROD_W'(w[f].value * a[i].value);
  end
endmodule
