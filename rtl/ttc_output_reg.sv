// ttc_output_reg: the two banks of eight flip-flops that drive the TTC(0-7)A
// and TTC(0-7)B copies of the TTC bus onto the backplane.
//
// Both banks capture the mapped bus on the rising edge of the TTC clock (the
// BC clock after the ROD setup delay), so every backplane line changes at the
// same time, one clock after the source. The document shows the two banks and
// their clock; the reset to zero is this design's choice.
`timescale 1ns / 1ps
module ttc_output_reg (
  input  logic       ttc_clk,
  input  logic       rst_n,
  input  logic [7:0] d,
  output logic [7:0] ttc_a,
  output logic [7:0] ttc_b
);
  always_ff @(posedge ttc_clk or negedge rst_n) begin
    if (!rst_n) begin
      ttc_a <= '0;
      ttc_b <= '0;
    end else begin
      ttc_a <= d;
      ttc_b <= d;
    end
  end
endmodule
