// tim_ram: single-port synchronous static RAM, the 32k x 8 sequencer RAM and
// sink RAM of the TIM.
//
// The document gives the size of both RAMs (8 bits by 32k words) and what they
// hold; the single-port, registered-read organisation is this design's choice.
// A write stores din at addr on the clock edge; rdata always shows the word
// at the address of the previous edge (one cycle read latency). A write also
// updates rdata with the new word.
`timescale 1ns / 1ps
module tim_ram #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 32768
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic                     we,
  input  logic [WIDTH-1:0]         din,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) begin
      mem[addr] <= din;
      rdata     <= din;
    end else begin
      rdata     <= mem[addr];
    end
  end
endmodule
