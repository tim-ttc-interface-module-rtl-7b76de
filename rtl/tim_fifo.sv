// tim_fifo: synchronous first-word-fall-through FIFO, used as the ID FIFO
// (L1ID + BCID) and the TT FIFO (trigger type) of the event ID queue.
//
// Event IDs are sent serially, much more slowly than triggers can arrive, so
// each event's ID waits here until the serialiser is free. The document
// requires a FIFO for this; its depth and its behaviour when full are this
// design's choices. dout shows the oldest word whenever empty is low; rd_en
// removes it. A write while full is dropped and sets the sticky overflow flag
// (cleared by clr_ovf). A write and a read in the same cycle are both done.
// Interface: single clock, asynchronous active-low reset, one write and one
// read per cycle at most, no latency from write to empty going low beyond
// one clock edge.
// The reset also disables the empty-read assertion; a lint tool may report
// rst_n as used both asynchronously and synchronously because of that.
`timescale 1ns / 1ps
module tim_fifo #(
  parameter int unsigned WIDTH = 36,
  parameter int unsigned DEPTH = 256
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] din,
  input  logic             rd_en,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic             full,
  output logic             overflow,
  input  logic             clr_ovf,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic             do_wr, do_rd;

  assign empty = (count == 0);
  assign full  = (count == DEPTH[AW:0]);
  assign do_rd = rd_en && !empty;
  assign do_wr = wr_en && (!full || do_rd);
  assign dout  = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      if (do_wr) wr_ptr <= (wr_ptr == AW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= (rd_ptr == AW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
      if (clr_ovf)               overflow <= 1'b0;
      else if (wr_en && !do_wr)  overflow <= 1'b1;
    end
  end

  // A read of an empty FIFO is a protocol error of the reader.
  a_no_read_empty: assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> !empty)
    else $error("tim_fifo: read while empty");
endmodule
