// l1id_gen: source of the 24-bit Level-1 trigger number (L1ID) for each event,
// the function of the PLD4a CPLD of the TIM.
//
// In stand-alone (SA) mode it counts the L1A commands itself: ECR clears the
// counter, and each L1A issues the current count and then increments it, so
// the first event after an ECR carries L1ID 0. An ECR and an L1A in the same
// cycle act in that order. In Run mode the number comes from the TTC
// interface, which assembles it from the TTCrx, and is issued when that block
// signals a complete event ID. The 24-bit width and the two sources follow the
// document; the counting convention is this design's choice.
// Outputs are registered: ev_wr pulses one cycle after the L1A (SA) or the
// event ID strobe (Run), with l1id valid in the same cycle; ev_wr is the
// write strobe of the ID FIFO.
`timescale 1ns / 1ps
module l1id_gen
  import tim_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              samode,
  input  logic              sa_l1a,
  input  logic              sa_ecr,
  input  logic              ttc_id_valid,
  input  logic [L1ID_W-1:0] ttc_l1id,
  output logic              ev_wr,
  output logic [L1ID_W-1:0] l1id
);
  logic [L1ID_W-1:0] cnt, cnt_base;

  assign cnt_base = sa_ecr ? '0 : cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      ev_wr <= 1'b0;
      l1id  <= '0;
    end else begin
      ev_wr <= 1'b0;
      if (samode) begin
        if (sa_l1a) begin
          l1id  <= cnt_base;
          ev_wr <= 1'b1;
          cnt   <= cnt_base + 1'b1;
        end else begin
          cnt   <= cnt_base;
        end
      end else if (ttc_id_valid) begin
        l1id  <= ttc_l1id;
        ev_wr <= 1'b1;
      end
    end
  end
endmodule
