// sa_gen_a: stand-alone fast command generator of the TIM (the PLD2 CPLD,
// "Stand-alone A").
//
// In stand-alone (SA) mode the fast commands come from several sources, and
// the document requires that all of them are synchronised to the clock in use.
// Sources combined here:
//   - one-shot commands written by the local processor over VME (vme_cmd,
//     already one-cycle pulses in this clock domain);
//   - external commands on the NIM and ECL front-panel inputs (ext_nim,
//     ext_ecl, one line per fast command, asynchronous levels): each passes
//     two synchroniser flip-flops and its rising edge gives one pulse; they are
//     enabled by ext_en and by the per-command mask ext_mask;
//   - the front-panel trigger switch (asynchronous, rising edge = one L1A);
//   - automatic triggers from sa_gen_b and automatic ECRs from the ECR/FER
//     oscillator (both already pulses).
// External and switch triggers pass a programmable delay of trig_delay clock
// cycles (0 to TRIG_DLY_MAX-1). Every L1A is suppressed while inhibit is high
// (the crate busy, when the busy inhibit is enabled); such a trigger is
// reported on vetoed. Output sa_cmd is registered: it follows a VME or
// automatic pulse by one cycle, and an external edge by three clock edges
// counted from the edge that first samples it, plus trig_delay cycles for a
// trigger. The line assignment of the inputs, the delay in
// whole cycles and the busy inhibit are this design's choices.
`timescale 1ns / 1ps
module sa_gen_a
  import tim_pkg::*;
#(
  parameter int unsigned TRIG_DLY_MAX = 256
) (
  input  logic       clk,
  input  logic       rst_n,
  input  fast_cmd_t  vme_cmd,
  input  logic [5:0] ext_nim,
  input  logic [5:0] ext_ecl,
  input  logic       ext_en,
  input  logic [5:0] ext_mask,
  input  logic       trigger_sw,
  input  logic [$clog2(TRIG_DLY_MAX)-1:0] trig_delay,
  input  logic       auto_trig,
  input  logic       auto_ecr,
  input  logic       inhibit,
  output fast_cmd_t  sa_cmd,
  output logic       vetoed
);
  logic [5:0] nim_s1, nim_s2, nim_s3;
  logic [5:0] ecl_s1, ecl_s2, ecl_s3;
  logic [2:0] sw_s;
  fast_cmd_t  ext;
  logic       ext_trig;
  logic [TRIG_DLY_MAX-1:0] dly_sr;
  logic       trig_delayed;
  fast_cmd_t  next;

  always_comb begin
    ext = fast_cmd_t'(((nim_s2 & ~nim_s3) | (ecl_s2 & ~ecl_s3)) & ext_mask & {6{ext_en}});
    ext_trig = ext.l1a || (sw_s[1] && !sw_s[2]);
    trig_delayed = (trig_delay == '0) ? ext_trig : dly_sr[trig_delay - 1'b1];

    next       = vme_cmd | ext;
    next.l1a   = vme_cmd.l1a || trig_delayed || auto_trig;
    next.ecr   = vme_cmd.ecr || ext.ecr || auto_ecr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nim_s1 <= '0; nim_s2 <= '0; nim_s3 <= '0;
      ecl_s1 <= '0; ecl_s2 <= '0; ecl_s3 <= '0;
      sw_s   <= '0;
      dly_sr <= '0;
      sa_cmd <= NO_CMD;
      vetoed <= 1'b0;
    end else begin
      nim_s1 <= ext_nim; nim_s2 <= nim_s1; nim_s3 <= nim_s2;
      ecl_s1 <= ext_ecl; ecl_s2 <= ecl_s1; ecl_s3 <= ecl_s2;
      sw_s   <= {sw_s[1:0], trigger_sw};
      dly_sr <= {dly_sr[TRIG_DLY_MAX-2:0], ext_trig};
      sa_cmd     <= next;
      sa_cmd.l1a <= next.l1a && !inhibit;
      vetoed     <= next.l1a && inhibit;
    end
  end
endmodule
