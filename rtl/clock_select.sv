// clock_select: clock sources and clock paths of the TIM in Run and
// stand-alone (SA) mode.
//
// Following the clock flow of the design:
//   - the 80.16 MHz crystal is divided by two to the internal clock INTCLK;
//   - the SA clock CLKIN is the OR of the external clocks (one NIM and two ECL
//     inputs) enabled by ENEXTCLK, and of INTCLK enabled by ENINTCLK;
//   - after the SA clock delay (DL1, outside this block) it comes back as
//     saclk_dly; the BC clock sent to the BOCs and RODs is that delayed SA
//     clock in SA mode and the TTCrx clock CLOCK40DES1 in Run mode;
//   - the clock of the logic (CLKINB4, before the TIM setup delay DL4) is the
//     output of the TTC setup delay DL3 in Run mode and bypasses DL3 (taking
//     the ROD setup delay output DL2OUT directly) in SA mode.
// The gates are written as plain combinational logic on clock nets, as drawn;
// switching the enables or the mode while the clocks run can give a short
// pulse, as it would on the board. The divider is reset by rst_n.
`timescale 1ns / 1ps
module clock_select (
  input  logic rst_n,
  input  logic xtal80,
  input  logic nim_ext_clk,
  input  logic ecl_ext_clk1,
  input  logic ecl_ext_clk2,
  input  logic enextclk,
  input  logic enintclk,
  input  logic samode,
  input  logic clock40des1,
  input  logic saclk_dly,
  input  logic dl2_out,
  input  logic dl3_out,
  output logic intclk,
  output logic clkin,
  output logic bc_clk,
  output logic clkinb4
);
  always_ff @(posedge xtal80 or negedge rst_n) begin
    if (!rst_n) intclk <= 1'b0;
    else        intclk <= !intclk;
  end

  assign clkin   = ((nim_ext_clk || ecl_ext_clk1 || ecl_ext_clk2) && enextclk) ||
                   (intclk && enintclk);
  assign bc_clk  = samode ? saclk_dly : clock40des1;
  assign clkinb4 = samode ? dl2_out : dl3_out;
endmodule
