// rod_busy: crate busy logic of the TIM (the PLD8 CPLD).
//
// The crate busy sent on to the BUSY module is the OR of the ROD busy inputs
// that are enabled by mask; it is combinational, so a ROD's busy reaches the
// output without waiting for a clock (the document asks for a masked OR). For
// the basic monitoring that the document mentions, the inputs are also
// synchronised to the clock (two flip-flops) and shown in status, and every
// input that has been busy since it was last cleared stays set in latched
// (clear with a one-cycle pulse on the matching bit of clr). crate_busy_sync
// is the synchronised masked OR, for use inside the TIM.
`timescale 1ns / 1ps
module rod_busy #(
  parameter int unsigned N_RODS = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_RODS-1:0] busy_in,
  input  logic [N_RODS-1:0] mask,
  input  logic [N_RODS-1:0] clr,
  output logic              crate_busy,
  output logic              crate_busy_sync,
  output logic [N_RODS-1:0] status,
  output logic [N_RODS-1:0] latched
);
  logic [N_RODS-1:0] meta;

  assign crate_busy      = |(busy_in & mask);
  assign crate_busy_sync = |(status & mask);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta    <= '0;
      status  <= '0;
      latched <= '0;
    end else begin
      meta    <= busy_in;
      status  <= meta;
      latched <= (latched & ~clr) | status;
    end
  end
endmodule
