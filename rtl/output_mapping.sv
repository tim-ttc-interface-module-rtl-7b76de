// output_mapping: backplane mapping of the TIM (the PLD6 CPLD). It chooses
// where the TTC bus comes from and puts each signal on its bus line.
//
// Three sources, as the document describes: the TTC system through the
// TTC interface (Run mode), the stand-alone generators (SA mode) and the
// sequencer RAM, whose 8-bit words are put on the bus unchanged. For the
// first two the fast commands L1A, ECR, BCR, CAL, FER and spare and the two
// serial event ID lines are placed on the bus lines given in tim_pkg (this
// bit assignment is this design's choice). When fer_from_ecr is set, an ECR
// also drives the FER line, following the document's proposal that FER is
// carried out by the ECR. The logic is combinational; the bus is registered
// by the TTC output flip-flops (ttc_output_reg).
`timescale 1ns / 1ps
module output_mapping
  import tim_pkg::*;
(
  input  bus_src_t  src,
  input  logic      fer_from_ecr,
  input  fast_cmd_t ttc_cmd,
  input  fast_cmd_t sa_cmd,
  input  logic      serial_id,
  input  logic      serial_tt,
  input  logic [7:0] seq_word,
  output logic [7:0] ttc_bus
);
  fast_cmd_t cmd;

  always_comb begin
    cmd = (src == SRC_RUN) ? ttc_cmd : sa_cmd;
    if (fer_from_ecr && cmd.ecr) cmd.fer = 1'b1;

    ttc_bus            = '0;
    ttc_bus[TTC_L1A]   = cmd.l1a;
    ttc_bus[TTC_ECR]   = cmd.ecr;
    ttc_bus[TTC_BCR]   = cmd.bcr;
    ttc_bus[TTC_CAL]   = cmd.cal;
    ttc_bus[TTC_SID]   = serial_id;
    ttc_bus[TTC_STT]   = serial_tt;
    ttc_bus[TTC_FER]   = cmd.fer;
    ttc_bus[TTC_SPARE] = cmd.spare;
    if (src == SRC_SEQ) ttc_bus = seq_word;
  end
endmodule
