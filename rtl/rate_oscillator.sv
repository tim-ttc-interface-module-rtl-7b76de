// rate_oscillator: programmable-rate pulse generator, used as the variable
// trigger oscillator and as the ECR/FER oscillator of the stand-alone mode.
//
// The document only names the two oscillators. Here each is a down-counter
// in the BC clock domain: with en high and period = N > 0 it gives a single-
// cycle pulse every N cycles, the first one N cycles after en rises or the
// period changes. period = 0 stops it. Changing period restarts the count.
`timescale 1ns / 1ps
module rate_oscillator #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] period,
  output logic             pulse
);
  logic [WIDTH-1:0] cnt;
  logic [WIDTH-1:0] period_q;
  logic             run;

  assign run = en && (period != '0) && (period == period_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= '0;
      period_q <= '0;
      pulse    <= 1'b0;
    end else begin
      period_q <= period;
      pulse    <= 1'b0;
      if (!run) begin
        cnt <= period - 1'b1;
      end else if (cnt == '0) begin
        cnt   <= period - 1'b1;
        pulse <= 1'b1;
      end else begin
        cnt <= cnt - 1'b1;
      end
    end
  end
endmodule
