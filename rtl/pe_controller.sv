// pe_controller: command sequencer of one processing element.
//
// After reset it clears every accumulator word (one word per cycle in all
// banks at once). It then accepts commands (cmd_valid / cmd_ready):
//
// OP_MAC   weight-stationary step. The four rows w_row .. w_row+3 of the
//          weight buffer are loaded into the weight registers (one row per
//          cycle, one cycle read latency). Then the group-buffer vectors
//          in_base .. in_base+in_len-1 are read into the input FIFO, each
//          tagged with the weight row of its pass. Stride-2 convolution makes
//          one pass (the weight row follows the vector's group); unit-stride
//          convolution and deconvolution make one pass per weight row that
//          holds at least one valid weight. The command ends when the input
//          FIFO and the product stage are empty; the banks may still be
//          absorbing their conflict buffers.
// OP_DRAIN waits until every bank is idle, then drains address 0 .. DEPTH-1:
//          each drain reads the word of all 32 banks at once (one output
//          block) into the ReLU/compression unit and zeroes it. A new
//          address is issued only when the banks are idle and the compression
//          unit has finished the previous block.
//
// Group-buffer reads are issued only while the input FIFO has room for them
// and the one read still in flight. The command set, the pass structure and
// the clear-after-reset are this design's choices; weight-stationary order
// with four weight groups in registers follows the stride-2 dataflow.
module pe_controller
  import sparse_stereo_pkg::*;
#(
  parameter int unsigned ACC_DEPTH = 128,
  parameter int unsigned WB_DEPTH  = 256,
  parameter int unsigned GB_DEPTH  = 512,
  parameter int unsigned IF_DEPTH  = 4,
  localparam int unsigned ADDR_W   = $clog2(ACC_DEPTH),
  localparam int unsigned WB_AW    = $clog2(WB_DEPTH),
  localparam int unsigned GB_AW    = $clog2(GB_DEPTH),
  localparam int unsigned IF_CW    = $clog2(IF_DEPTH + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // commands
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  pe_cmd_t           cmd,
  // weight buffer read and weight register load
  output logic              wb_re,
  output logic [WB_AW-1:0]  wb_raddr,
  output logic              wr_load,
  output logic [GRP_W-1:0]  wr_row,
  input  weight_row_t       wr_data,
  // group buffer read and input FIFO write
  output logic              gb_re,
  output logic [GB_AW-1:0]  gb_raddr,
  output logic              if_push,
  output logic [GRP_W-1:0]  if_row,
  input  logic [IF_CW-1:0]  if_count,
  input  logic              mac_empty,    // input FIFO and product stage empty
  // accumulator banks and compression
  input  logic              banks_idle,
  input  logic              blk_ready,
  output logic              acc_clr,
  output logic              acc_drn,
  output logic [ADDR_W-1:0] acc_addr,
  // current command fields
  output conv_mode_e        mode,
  output logic [3:0]        dc_off,
  output logic              relu,
  output logic              busy
);
  typedef enum logic [2:0] {
    S_INIT, S_IDLE, S_LOADW, S_STREAM, S_WAIT_MAC, S_DRAIN_WAIT, S_DRAIN, S_DRAIN_END
  } state_e;

  state_e               state;
  pe_cmd_t              cur;
  logic [2:0]           wcnt;            // weight rows requested
  logic [N_GROUPS-1:0]  row_has;         // row holds a valid weight
  logic [GRP_W-1:0]     pass;
  logic [11:0]          idx;
  logic [ADDR_W:0]      addr_cnt;
  logic [1:0]           end_cnt;
  logic                 rd_pend;         // group-buffer read in flight
  logic [GRP_W-1:0]     rd_row;
  logic                 wld;             // weight-buffer read in flight
  logic [GRP_W-1:0]     wld_row;

  // next pass with valid weights after pass p (returns N_GROUPS if none)
  function automatic logic [GRP_W:0] next_pass(logic [N_GROUPS-1:0] has, int p);
    for (int r = p + 1; r < N_GROUPS; r++)
      if (has[r]) return (GRP_W+1)'(r);
    return (GRP_W+1)'(N_GROUPS);
  endfunction

  logic issue;
  always_comb begin
    issue = (state == S_STREAM) && (idx < cur.in_len) &&
            (32'(if_count) + 32'(rd_pend) + 1 <= IF_DEPTH);
  end

  assign cmd_ready = (state == S_IDLE);
  assign mode      = cur.mode;
  assign dc_off    = cur.dc_off;
  assign relu      = cur.relu;
  assign busy      = (state != S_IDLE);

  assign wb_re     = (state == S_LOADW) && (wcnt < 3'(N_GROUPS));
  assign wb_raddr  = WB_AW'(cur.w_row) + WB_AW'(wcnt);
  assign wr_load   = wld;
  assign wr_row    = wld_row;

  assign gb_re     = issue;
  assign gb_raddr  = GB_AW'(cur.in_base + idx);
  assign if_push   = rd_pend;
  assign if_row    = rd_row;

  assign acc_clr   = (state == S_INIT);
  assign acc_drn   = (state == S_DRAIN) && banks_idle && blk_ready;
  assign acc_addr  = ADDR_W'(addr_cnt);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_INIT;
      cur      <= '0;
      wcnt     <= '0;
      row_has  <= '0;
      pass     <= '0;
      idx      <= '0;
      addr_cnt <= '0;
      end_cnt  <= '0;
      rd_pend  <= 1'b0;
      rd_row   <= '0;
      wld      <= 1'b0;
      wld_row  <= '0;
    end else begin
      rd_pend <= issue;
      rd_row  <= pass;
      wld     <= wb_re;
      wld_row <= GRP_W'(wcnt);
      if (wld) row_has[wld_row] <= |{wr_data[0].valid, wr_data[1].valid,
                                     wr_data[2].valid, wr_data[3].valid};
      unique case (state)
        S_INIT: begin
          addr_cnt <= addr_cnt + 1'b1;
          if (32'(addr_cnt) == ACC_DEPTH - 1) begin
            addr_cnt <= '0;
            state    <= S_IDLE;
          end
        end
        S_IDLE: begin
          if (cmd_valid) begin
            cur <= cmd;
            if (cmd.op == OP_DRAIN) begin
              state <= S_DRAIN_WAIT;
            end else begin
              state <= S_LOADW;
              wcnt  <= '0;
            end
          end
        end
        S_LOADW: begin
          if (wcnt < 3'(N_GROUPS)) begin
            wcnt <= wcnt + 1'b1;
          end else if (!wld) begin
            // all rows are in the registers; pick the first pass
            idx <= '0;
            if (cur.mode == MODE_CONV2) begin
              pass  <= '0;
              state <= S_STREAM;
            end else begin
              automatic logic [GRP_W:0] np = next_pass(row_has, -1);
              if (np == (GRP_W+1)'(N_GROUPS)) state <= S_WAIT_MAC;
              else begin
                pass  <= GRP_W'(np);
                state <= S_STREAM;
              end
            end
          end
        end
        S_STREAM: begin
          if (issue) idx <= idx + 1'b1;
          if (idx >= cur.in_len || (issue && idx + 1'b1 == cur.in_len)) begin
            if (cur.mode == MODE_CONV2) begin
              state <= S_WAIT_MAC;
            end else begin
              automatic logic [GRP_W:0] np = next_pass(row_has, int'(pass));
              if (np == (GRP_W+1)'(N_GROUPS)) state <= S_WAIT_MAC;
              else begin
                pass <= GRP_W'(np);
                idx  <= '0;
              end
            end
          end
        end
        S_WAIT_MAC: begin
          if (!rd_pend && mac_empty) state <= S_IDLE;
        end
        S_DRAIN_WAIT: begin
          if (mac_empty && banks_idle) begin
            addr_cnt <= '0;
            state    <= S_DRAIN;
          end
        end
        S_DRAIN: begin
          if (acc_drn) begin
            addr_cnt <= addr_cnt + 1'b1;
            if (32'(addr_cnt) == ACC_DEPTH - 1) begin
              state   <= S_DRAIN_END;
              end_cnt <= '0;
            end
          end
        end
        S_DRAIN_END: begin
          // let the last block reach the compression unit, then wait for it
          if (end_cnt != 2'd3) end_cnt <= end_cnt + 1'b1;
          else if (blk_ready && banks_idle) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
