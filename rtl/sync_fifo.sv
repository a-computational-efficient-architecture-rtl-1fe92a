// sync_fifo: synchronous first-in first-out buffer with valid/ready ports.
//
// Used as the PE's input FIFO (between the group buffer and the multiplier
// array) and as its compress buffer (between the ReLU/compression unit and
// DRAM). A word is written when in_valid and in_ready are both high and leaves
// when out_valid and out_ready are both high; a write and a read may happen in
// the same cycle. out_data shows the oldest word with no extra latency. count
// gives the fill level so that a producer with read latency can reserve room.
// The depth is this design's choice.
module sync_fifo #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = 4,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  T       in_data,
  output logic   out_valid,
  input  logic   out_ready,
  output T       out_data,
  output logic [CW-1:0] count
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T               mem [DEPTH];
  logic [PW-1:0]  rd_ptr, wr_ptr;
  logic           push, pop;

  assign in_ready  = (count < CW'(DEPTH));
  assign out_valid = (count != '0);
  assign out_data  = mem[rd_ptr];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  function automatic logic [PW-1:0] next_ptr(logic [PW-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      count <= count + CW'(push) - CW'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
  end

  // a word may only be taken when one is there
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> count != '0);
endmodule
