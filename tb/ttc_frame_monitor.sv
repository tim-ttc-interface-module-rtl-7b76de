// ttc_frame_monitor: test bench receiver for the TTC backplane bus.
//
// On every rising edge of clk it samples the 8-bit bus (shortly after the
// edge, so that it sees the value the output register has just taken),
// counts the fast commands and decodes the serial event ID frames: a '1'
// start bit on the Serial ID line (with one on Serial TT), then 36 bits of
// L1ID and BCID and 10 bits of trigger type, most significant bit first.
// For each complete frame it pulses frame_valid for one time step with the
// decoded fields. It checks only that Serial TT starts with Serial ID.
`timescale 1ns / 1ps
module ttc_frame_monitor
  import tim_pkg::*;
(
  input  logic                clk,
  input  logic [7:0]          bus,
  output logic                frame_valid,
  output logic [L1ID_W-1:0]   l1id,
  output logic [BCID_W-1:0]   bcid,
  output logic [TTID_W-1:0]   ttid,
  output int                  n_l1a,
  output int                  n_ecr,
  output int                  n_bcr,
  output int                  n_cal,
  output int                  n_fer,
  output int                  n_frames,
  output int                  n_bad_start
);
  initial begin
    frame_valid = 0; l1id = '0; bcid = '0; ttid = '0;
    n_l1a = 0; n_ecr = 0; n_bcr = 0; n_cal = 0; n_fer = 0; n_frames = 0; n_bad_start = 0;
  end

  always @(posedge clk) begin
    #0.2;
    if (bus[TTC_L1A]) n_l1a++;
    if (bus[TTC_ECR]) n_ecr++;
    if (bus[TTC_BCR]) n_bcr++;
    if (bus[TTC_CAL]) n_cal++;
    if (bus[TTC_FER]) n_fer++;
  end

  initial begin
    logic [EVID_W-1:0] f_id; logic [TTID_W-1:0] f_tt;
    forever begin
      @(posedge clk); #0.3;
      if (!bus[TTC_SID]) continue;
      if (!bus[TTC_STT]) n_bad_start++;
      f_id = '0; f_tt = '0;
      for (int b = 0; b < EVID_W; b++) begin
        @(posedge clk); #0.3;
        f_id = {f_id[EVID_W-2:0], bus[TTC_SID]};
        if (b < TTID_W) f_tt = {f_tt[TTID_W-2:0], bus[TTC_STT]};
      end
      n_frames++;
      l1id = f_id[EVID_W-1:BCID_W]; bcid = f_id[BCID_W-1:0]; ttid = f_tt;
      frame_valid = 1; #0.01 frame_valid = 0;
    end
  end
endmodule
