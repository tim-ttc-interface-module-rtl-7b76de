// sa_gen_b: automatic trigger generator of the TIM (the PLD3 CPLD,
// "Stand-alone B").
//
// The document says the TIM can generate triggers automatically under control
// of the local processor, and shows a variable trigger oscillator feeding this
// CPLD; the rest is this design's choice. While en is high, every pulse of the
// trigger oscillator (osc) gives one trigger on auto_trig, one cycle later,
// until trig_num triggers have been issued (trig_num = 0: no limit); done
// then goes high. A pulse that arrives while inhibit (crate busy) is high is
// skipped and not counted. trig_cnt counts the triggers issued since en rose;
// dropping en clears it.
`timescale 1ns / 1ps
module sa_gen_b #(
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             osc,
  input  logic             inhibit,
  input  logic [CNT_W-1:0] trig_num,
  output logic             auto_trig,
  output logic [CNT_W-1:0] trig_cnt,
  output logic             done
);
  assign done = en && (trig_num != '0) && (trig_cnt >= trig_num);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      auto_trig <= 1'b0;
      trig_cnt  <= '0;
    end else begin
      auto_trig <= 1'b0;
      if (!en) begin
        trig_cnt <= '0;
      end else if (osc && !inhibit && !done) begin
        auto_trig <= 1'b1;
        trig_cnt  <= trig_cnt + 1'b1;
      end
    end
  end
endmodule
