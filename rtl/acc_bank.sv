// acc_bank: one single-port accumulator bank with its read-modify-write engine.
//
// The bank stores DEPTH partial sums of ACC_W bits. Being single-ported, a
// read and the following store take two cycles: in the first cycle the engine
// takes the head cluster of the conflict buffer (upd_pop) and reads its word,
// in the second it writes back word + cluster sum. Between updates the
// controller can
//   - clear a word (clr, one cycle, used after reset),
//   - drain a word (drn): read it in the first cycle, present it on drn_data
//     with drn_valid in the second while writing zero into it.
// Clear and drain take priority over updates; the controller only issues them
// while the bank is idle. The single port and the two-cycle read and store
// follow the architecture description; the drain-and-clear behaviour is this
// design's choice.
module acc_bank
  import sparse_stereo_pkg::*;
#(
  parameter int unsigned DEPTH  = 128,
  localparam int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // updates from the conflict buffer
  input  logic                    upd_valid,
  output logic                    upd_pop,
  input  logic [ADDR_W-1:0]       upd_addr,
  input  logic signed [ACC_W-1:0] upd_sum,
  // clear and drain (controller)
  input  logic                    clr,
  input  logic                    drn,
  input  logic [ADDR_W-1:0]       ctl_addr,
  output logic                    drn_valid,
  output logic signed [ACC_W-1:0] drn_data,
  output logic                    busy
);
  typedef enum logic [1:0] {S_IDLE, S_UPD_WR, S_DRN_WR} state_e;

  logic signed [ACC_W-1:0] mem [DEPTH];
  logic signed [ACC_W-1:0] rdata;
  logic signed [ACC_W-1:0] lat_sum;
  logic [ADDR_W-1:0]       lat_addr;
  state_e                  state;

  // single memory port: one of read or write per cycle
  logic                    m_we, m_re;
  logic [ADDR_W-1:0]       m_addr;
  logic signed [ACC_W-1:0] m_wdata;

  always_comb begin
    m_we    = 1'b0;
    m_re    = 1'b0;
    m_addr  = ctl_addr;
    m_wdata = '0;
    upd_pop = 1'b0;
    unique case (state)
      S_IDLE: begin
        if (clr) begin
          m_we = 1'b1;
        end else if (drn) begin
          m_re = 1'b1;
        end else if (upd_valid) begin
          m_re    = 1'b1;
          m_addr  = upd_addr;
          upd_pop = 1'b1;
        end
      end
      S_UPD_WR: begin
        m_we    = 1'b1;
        m_addr  = lat_addr;
        m_wdata = rdata + lat_sum;
      end
      S_DRN_WR: begin
        m_we   = 1'b1;
        m_addr = lat_addr;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (m_we)      mem[m_addr] <= m_wdata;
    else if (m_re) rdata <= mem[m_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      lat_addr <= '0;
      lat_sum  <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (clr) begin
            state <= S_IDLE;
          end else if (drn) begin
            state    <= S_DRN_WR;
            lat_addr <= ctl_addr;
          end else if (upd_valid) begin
            state    <= S_UPD_WR;
            lat_addr <= upd_addr;
            lat_sum  <= upd_sum;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign drn_valid = (state == S_DRN_WR);
  assign drn_data  = rdata;
  assign busy      = (state != S_IDLE);

  a_ctl_only_idle: assert property (@(posedge clk) disable iff (!rst_n) (clr || drn) |-> state == S_IDLE);
endmodule
