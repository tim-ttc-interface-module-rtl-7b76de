// prog_delay_line: behavioural model (not synthesizable) of a programmable
// clock delay line, the part used for the delays DL1 to DL4 of the TIM clock
// paths.
//
// The output is a copy of the input delayed by BASE_PS + sel * STEP_PS
// picoseconds (transport delay: every edge is kept). The design shows 6-bit
// switch settings for the ROD, TTC and TIM setup delays and a register
// setting for the SA clock delay; the insertion delay and the step size of
// the real parts are not given, so BASE_PS and STEP_PS are this model's
// choices. sel may change at any time; an edge already on its way keeps the
// delay it had when it entered.
// A delay of zero is never produced (BASE_PS > 0), although a lint tool that
// cannot see the value of the computed delay may warn that it could be.
`timescale 1ns / 1ps
module prog_delay_line #(
  parameter int unsigned SEL_W   = 6,
  parameter int unsigned BASE_PS = 500,
  parameter int unsigned STEP_PS = 250
) (
  input  logic             din,
  input  logic [SEL_W-1:0] sel,
  output logic             dout
);
  initial dout = 1'b0;

  // Each edge is carried by its own process, so edges closer together than
  // the delay are all kept.
  always @(din) begin
    automatic logic        level = din;
    automatic int unsigned dly   = BASE_PS + STEP_PS * sel;
    fork
      begin
        #(dly * 1ps);
        dout = level;
      end
    join_none
  end
endmodule
