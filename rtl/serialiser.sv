// serialiser: sends the queued event IDs onto the two serial lines of the TTC
// backplane bus, Serial ID and Serial TT (the PLD5 CPLD).
//
// The document says the event ID goes to the RODs with a serial protocol,
// through a FIFO, but gives no frame format. The frame used here: both lines
// idle low; when the ID FIFO and the TT FIFO both hold an event and the
// serialiser is idle, it takes one word from each and sends, on each line, a
// start bit '1' followed by the data most significant bit first, one bit per
// BC clock. Serial ID carries L1ID[23:0] then BCID[11:0] (37 cycles with the
// start bit); Serial TT carries the 8-bit trigger type and its 2 spare bits
// (11 cycles) at the same time. The line is low for at least one cycle
// between frames, so at most one event leaves every 38 cycles. The first bit
// appears one cycle after an event is available in both FIFOs.
// FIFO interface: first-word-fall-through, rd_* pulses pop the word shown.
`timescale 1ns / 1ps
module serialiser
  import tim_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              id_empty,
  input  logic [EVID_W-1:0] id_data,
  output logic              id_rd,
  input  logic              tt_empty,
  input  logic [TTID_W-1:0] tt_data,
  output logic              tt_rd,
  output logic              serial_id,
  output logic              serial_tt,
  output logic              busy
);
  localparam int unsigned FRAME = EVID_W + 1;   // start bit + data

  logic [EVID_W:0]   id_sr;     // start bit + ID, shifted out at the top
  logic [EVID_W:0]   tt_sr;     // start bit + TT, left-aligned, zero filled
  logic [$clog2(FRAME+1)-1:0] bits_left;
  logic              start;

  assign busy      = (bits_left != '0);
  assign start     = !busy && !id_empty && !tt_empty;
  assign id_rd     = start;
  assign tt_rd     = start;
  assign serial_id = id_sr[EVID_W];
  assign serial_tt = tt_sr[EVID_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      id_sr     <= '0;
      tt_sr     <= '0;
      bits_left <= '0;
    end else if (start) begin
      id_sr     <= {1'b1, id_data};
      tt_sr     <= {1'b1, tt_data, {(EVID_W - TTID_W){1'b0}}};
      bits_left <= FRAME[$clog2(FRAME+1)-1:0];
    end else begin
      id_sr     <= {id_sr[EVID_W-1:0], 1'b0};
      tt_sr     <= {tt_sr[EVID_W-1:0], 1'b0};
      if (busy) bits_left <= bits_left - 1'b1;
    end
  end
endmodule
