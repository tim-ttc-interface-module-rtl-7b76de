// ttc_interface: Run-mode source of fast commands and event ID, taken from the
// outputs of the TTCrx receiver chip (the PLD9 CPLD of the TIM).
//
// The document says only that the TTCrx provides the BC clock and all the TTC
// signals, and that this interface passes them on. The TTCrx output signals
// used here follow that chip's usual outputs, which the document does not
// list: a Level-1 accept pulse, bunch and event counter reset pulses, broadcast
// command bits brcst[7:2] with a strobe, a 12-bit counter bus that carries
// the bunch number (bcnt_str) and then the low and high halves of the event
// number (evcnt_lstr, evcnt_hstr), and an 8-bit data port with a strobe
// that here carries the trigger type. The broadcast bits used are brcst[2]
// = CAL, brcst[3] = FER and brcst[4] = spare; this, and the use of the data
// port for the trigger type, are this design's choices.
// Timing: every fast command leaves one clock after it arrives (one register
// stage). An event ID is complete when both the high event number half and a
// trigger type have arrived, in either order; id_valid then pulses for one
// cycle with l1id, bcid and ttid (spare bits zero).
// brcst[7:5] are accepted but unused: they are free for further commands.
`timescale 1ns / 1ps
module ttc_interface
  import tim_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // TTCrx side
  input  logic              l1accept,
  input  logic              bcnt_res,
  input  logic              evcnt_res,
  input  logic [7:2]        brcst,
  input  logic              brcst_str,
  input  logic [11:0]       cnt_bus,
  input  logic              bcnt_str,
  input  logic              evcnt_lstr,
  input  logic              evcnt_hstr,
  input  logic [7:0]        dout,
  input  logic              dout_str,
  // TIM side
  output fast_cmd_t         cmd,
  output logic              id_valid,
  output logic [L1ID_W-1:0] l1id,
  output logic [BCID_W-1:0] bcid,
  output logic [TTID_W-1:0] ttid
);
  logic [BCID_W-1:0] bcid_q;
  logic [11:0]       l1id_lo_q;
  logic [L1ID_W-1:0] l1id_q;
  logic [7:0]        tt_q;
  logic              have_ev, have_tt;
  logic              ev_now, tt_now;

  assign ev_now = have_ev || evcnt_hstr;
  assign tt_now = have_tt || dout_str;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmd       <= NO_CMD;
      bcid_q    <= '0;
      l1id_lo_q <= '0;
      l1id_q    <= '0;
      tt_q      <= '0;
      have_ev   <= 1'b0;
      have_tt   <= 1'b0;
      id_valid  <= 1'b0;
      l1id      <= '0;
      bcid      <= '0;
      ttid      <= '0;
    end else begin
      cmd.l1a   <= l1accept;
      cmd.bcr   <= bcnt_res;
      cmd.ecr   <= evcnt_res;
      cmd.cal   <= brcst_str && brcst[2];
      cmd.fer   <= brcst_str && brcst[3];
      cmd.spare <= brcst_str && brcst[4];

      if (bcnt_str)   bcid_q    <= cnt_bus;
      if (evcnt_lstr) l1id_lo_q <= cnt_bus;
      if (evcnt_hstr) l1id_q    <= {cnt_bus, l1id_lo_q};
      if (dout_str)   tt_q      <= dout;

      id_valid <= 1'b0;
      if (ev_now && tt_now) begin
        id_valid <= 1'b1;
        l1id     <= evcnt_hstr ? {cnt_bus, l1id_lo_q} : l1id_q;
        bcid     <= bcid_q;
        ttid     <= {2'b00, dout_str ? dout : tt_q};
        have_ev  <= 1'b0;
        have_tt  <= 1'b0;
      end else begin
        have_ev  <= ev_now;
        have_tt  <= tt_now;
      end
    end
  end
endmodule
