// bcid_ttid_gen: bunch crossing number (12-bit BCID) and trigger type (8-bit
// TTID plus 2 spare bits) for each event, the function of the PLD4b CPLD.
//
// In stand-alone (SA) mode a 12-bit counter advances on every BC clock and is
// cleared by BCR (the cycle after the BCR it reads 0, then 1, ...); on an L1A
// the current count is taken as the event's BCID and the trigger type comes
// from the stand-alone trigger type register. In Run mode both come from the
// TTC interface when it signals a complete event ID. Widths follow the
// document; the counter convention is this design's choice. Outputs are
// registered and appear in the same cycle as the L1ID of l1id_gen, so that the
// pair can be written into the ID and TT FIFOs together (ev_wr).
`timescale 1ns / 1ps
module bcid_ttid_gen
  import tim_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              samode,
  input  logic              sa_l1a,
  input  logic              sa_bcr,
  input  logic [TTID_W-1:0] sa_ttid,
  input  logic              ttc_id_valid,
  input  logic [BCID_W-1:0] ttc_bcid,
  input  logic [TTID_W-1:0] ttc_ttid,
  output logic              ev_wr,
  output logic [BCID_W-1:0] bcid,
  output logic [TTID_W-1:0] ttid
);
  logic [BCID_W-1:0] bc_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bc_cnt <= '0;
      ev_wr  <= 1'b0;
      bcid   <= '0;
      ttid   <= '0;
    end else begin
      ev_wr  <= 1'b0;
      bc_cnt <= sa_bcr ? '0 : bc_cnt + 1'b1;
      if (samode) begin
        if (sa_l1a) begin
          bcid  <= bc_cnt;
          ttid  <= sa_ttid;
          ev_wr <= 1'b1;
        end
      end else if (ttc_id_valid) begin
        bcid  <= ttc_bcid;
        ttid  <= ttc_ttid;
        ev_wr <= 1'b1;
      end
    end
  end
endmodule
