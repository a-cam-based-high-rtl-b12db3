// sched_fifo: the scheduler's FIFO buffer.
//
// Built as the document draws it: a chain of registers that every write
// shifts by one place (new entries enter at the tail, stage 0) and a tap
// multiplexer that reads the head, the oldest entry, at stage count-1.
// `empty` and `full` come from the entry count. A write when full (without a
// read) is ignored, a read when empty is ignored. A read and a write in the
// same clock keep the count: with `din` = `dout` this moves the head packet
// to the tail, which is how the scheduler re-queues a packet whose port is
// congested. `dout` is valid combinationally whenever `empty` is low.
// DEPTH is this design's choice; the document gives no FIFO size.
module sched_fifo #(
  parameter int DEPTH = 16,
  parameter int WIDTH = 264
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] din,
  input  logic             rd_en,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic             full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int CW = $clog2(DEPTH+1);

  logic [WIDTH-1:0] sr [DEPTH];
  logic do_rd, do_wr;

  assign empty = (count == '0);
  assign full  = (count == CW'(DEPTH));
  assign do_rd = rd_en && !empty;
  assign do_wr = wr_en && (!full || do_rd);

  always_ff @(posedge clk) begin
    if (do_wr) begin
      sr[0] <= din;
      for (int i = 1; i < DEPTH; i++) sr[i] <= sr[i-1];
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) count <= '0;
    else     count <= count + CW'(do_wr) - CW'(do_rd);
  end

  localparam int IW = $clog2(DEPTH);
  logic [IW-1:0] tap;
  assign tap  = empty ? '0 : IW'(count - CW'(1));
  assign dout = sr[tap];
endmodule
