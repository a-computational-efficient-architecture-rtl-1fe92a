// sparse_stereo_pkg: shared widths, operating modes and record layouts of the
// sparse stereo accelerator.
//
// The accelerator computes convolutions of a pruned network on compressed data:
// every activation and every weight travels as a non-zero value together with
// its coordinates. A processing element (PE) multiplies F non-zero weights with
// I non-zero activations per cycle (a Cartesian product) and scatters the
// F x I products into 32 accumulator banks. The numbers F = I = 4, the 32 banks,
// the 8 x 4 output block and the four checkerboard groups follow the
// architecture description; the data widths, coordinate widths and command
// layout are this design's own choices.
package sparse_stereo_pkg;

  // ---- array geometry (architecture description) ----
  localparam int unsigned F_NUM     = 4;   // non-zero weights per cycle
  localparam int unsigned I_NUM     = 4;   // non-zero activations per cycle
  localparam int unsigned N_PROD    = F_NUM * I_NUM;
  localparam int unsigned N_BANKS   = 32;  // accumulator banks per PE
  localparam int unsigned BLK_W     = 8;   // output block width  (one bank per pixel)
  localparam int unsigned BLK_H     = 4;   // output block height
  localparam int unsigned N_GROUPS  = 4;   // checkerboard groups

  // ---- widths (this design's choices) ----
  localparam int unsigned DATA_W    = 16;  // signed activation / weight value
  localparam int unsigned PROD_W    = 2 * DATA_W;
  localparam int unsigned ACC_W     = 32;  // accumulator word
  localparam int unsigned COORD_W   = 6;   // tile-local x / y coordinate
  localparam int unsigned KPOS_W    = 3;   // kernel position kx / ky (kernels up to 8 x 8)
  localparam int unsigned KCH_W     = 4;   // output channel within one pass
  localparam int unsigned BANK_W    = $clog2(N_BANKS);
  localparam int unsigned GRP_W     = $clog2(N_GROUPS);

  // ---- operating modes ----
  typedef enum logic [1:0] {
    MODE_CONV1  = 2'd0,   // unit-stride convolution
    MODE_CONV2  = 2'd1,   // stride-2 convolution, group-to-group
    MODE_DECONV = 2'd2    // stride-2 deconvolution decomposed into 4 sub-kernels
  } conv_mode_e;

  typedef enum logic [0:0] {
    OP_MAC   = 1'b0,      // load one weight set and stream an input range through it
    OP_DRAIN = 1'b1       // read out, ReLU, compress and clear the accumulators
  } pe_op_e;

  // ---- records ----
  typedef struct packed {
    logic                     valid;
    logic signed [DATA_W-1:0] value;
    logic [KPOS_W-1:0]        kx;
    logic [KPOS_W-1:0]        ky;
    logic [KCH_W-1:0]         k;
  } weight_t;

  typedef weight_t [F_NUM-1:0] weight_row_t;   // one weight-buffer row

  typedef struct packed {
    logic                     valid;
    logic signed [DATA_W-1:0] value;
    logic [COORD_W-1:0]       x;
    logic [COORD_W-1:0]       y;
  } act_t;

  // I activations of one checkerboard group, as stored in the group buffer
  typedef struct packed {
    logic [GRP_W-1:0]   group;
    act_t [I_NUM-1:0]   a;
  } act_vec_t;

  // compressed output activation, written back towards DRAM
  typedef struct packed {
    logic                     valid;
    logic signed [DATA_W-1:0] value;
    logic [COORD_W-1:0]       x;
    logic [COORD_W-1:0]       y;
    logic [KCH_W-1:0]         k;
  } out_act_t;

  typedef struct packed {
    logic [GRP_W-1:0]     group;
    out_act_t [I_NUM-1:0] a;
  } out_vec_t;

  // PE command
  typedef struct packed {
    pe_op_e       op;
    conv_mode_e   mode;
    logic [7:0]   w_row;       // first weight-buffer row of the weight set
    logic [11:0]  in_base;     // first group-buffer vector
    logic [11:0]  in_len;      // number of group-buffer vectors
    logic [3:0]   dc_off;      // deconvolution output offset: xo = 2*xi + kx - dc_off
    logic         relu;        // apply ReLU while draining
  } pe_cmd_t;

endpackage
