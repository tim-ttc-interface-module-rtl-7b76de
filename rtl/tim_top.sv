// tim_top: the TTC Interface Module (TIM) of an SCT/PIXEL ROD crate.
//
// The TIM passes the bunch crossing (BC) clock, the fast commands (L1A, ECR,
// BCR, CAL, FER) and the event ID (24-bit L1ID, 12-bit BCID, trigger type)
// from the TTC system to the RODs of one crate, and returns the masked OR of
// the ROD busys. In Run mode everything comes from the TTCrx receiver; in
// stand-alone (SA) mode the TIM makes all of it itself under control of the
// local processor (VME), from VME commands, front-panel inputs, a trigger
// oscillator, an ECR oscillator or a sequencer RAM, and a sink RAM records what
// was sent.
//
// Blocks, as the board is divided: vme_interface + tim_regs (VME slave and
// registers), sa_gen_a and sa_gen_b with two rate_oscillators (stand-alone
// commands and triggers), ttc_interface (TTCrx outputs), l1id_gen and
// bcid_ttid_gen (event ID), two tim_fifo (ID FIFO and TT FIFO), serialiser
// (Serial ID and Serial TT lines), output_mapping (source selection and bus
// lines), ttc_output_reg (TTC(0-7)A and B), seq_sink with two 32k x 8 tim_ram
// (sequencer and sink), rod_busy, clock_select and four prog_delay_line
// models (DL1 SA clock delay, DL2 ROD setup, DL3 TTC setup, DL4 TIM setup).
//
// Clocks: bc_clk (TTCrx clock in Run mode, delayed SA clock in SA mode) goes
// to the 9 + 8 PECL clock outputs; after DL2 it is the TTC clock, which clocks
// the output flip-flops and goes to the front-panel clock outputs; after DL3
// (Run mode only) and DL4 it clocks all the logic. Fast commands reach the
// TTC bus two logic clocks after the TTCrx gives them (ttc_interface register,
// output flip-flop). Reset is asynchronous: rst_n low or the reset switch.
// The delay lines are behavioural models, so this top level simulates but is
// synthesizable only with real delay parts in their place.
// Signals left unconnected on purpose: the trigger window register (its
// delay chain is not part of this model), the undivided internal clock
// (observable for test only), the veto flag of sa_gen_a, the FIFO levels and
// the TT FIFO full flag (the two FIFOs fill together, so the ID FIFO flags
// stand for both). The arst_n warning of some lint tools comes from the FIFO
// assertion's disable condition, not from logic.
// Multi-crate use: a second TIM can be driven by this one by taking its
// front-panel clock and bus copy into the external ECL clock and command
// inputs; it then counts the same triggers and builds its own event IDs.
`timescale 1ns / 1ps
module tim_top
  import tim_pkg::*;
#(
  parameter int unsigned N_RODS    = 16,
  parameter int unsigned SEQ_DEPTH = 32768,
  parameter int unsigned FIFO_DEPTH = 256,
  localparam int unsigned AW       = $clog2(SEQ_DEPTH)
) (
  input  logic              rst_n,
  input  logic              reset_sw,
  // clocks
  input  logic              xtal80,
  input  logic              nim_ext_clk,
  input  logic              ecl_ext_clk1,
  input  logic              ecl_ext_clk2,
  input  logic              clock40des1,
  input  logic [5:0]        sw2,
  input  logic [5:0]        sw3,
  input  logic [5:0]        sw4,
  output logic [16:0]       bc_clk_out,
  output logic              clk_out,
  // TTCrx outputs
  input  logic              ttcrx_ready,
  input  logic              ttcrx_l1accept,
  input  logic              ttcrx_bcnt_res,
  input  logic              ttcrx_evcnt_res,
  input  logic [7:2]        ttcrx_brcst,
  input  logic              ttcrx_brcst_str,
  input  logic [11:0]       ttcrx_cnt_bus,
  input  logic              ttcrx_bcnt_str,
  input  logic              ttcrx_evcnt_lstr,
  input  logic              ttcrx_evcnt_hstr,
  input  logic [7:0]        ttcrx_dout,
  input  logic              ttcrx_dout_str,
  // front panel
  input  logic [5:0]        ext_nim_cmd,
  input  logic [5:0]        ext_ecl_cmd,
  input  logic              trigger_sw,
  output logic [7:0]        fp_ttc,
  // backplane
  output logic [7:0]        ttc_a,
  output logic [7:0]        ttc_b,
  input  logic [N_RODS-1:0] rod_busy,
  output logic              crate_busy,
  // VME
  input  logic              vme_as_n,
  input  logic [1:0]        vme_ds_n,
  input  logic              vme_write_n,
  input  logic [5:0]        vme_am,
  input  logic [31:1]       vme_a,
  input  logic [15:0]       vme_d_in,
  output logic [15:0]       vme_d_out,
  output logic              vme_d_oe,
  output logic              vme_dtack_n,
  output logic              vme_irq_n,
  input  logic [4:0]        vme_ga,
  input  logic              cfg_a32,
  input  logic              cfg_use_ga,
  input  logic [15:0]       cfg_base
);
  logic        arst_n;
  logic        clkin, saclk_dly_clk, bc_clk, dl2_out, dl3_out, clkinb4, pld_clk;
  logic        intclk;

  // register bank outputs
  ctrl_t       ctrl;
  fast_cmd_t   vme_cmd;
  logic        seq_start, seq_stop, clr_ovf;
  logic [15:0] trig_period, ecr_period, window, trig_num, trig_cnt;
  logic [7:0]  saclk_dly, trig_dly;
  logic [TTID_W-1:0] sa_ttid;
  logic [N_RODS-1:0] busy_mask, busy_clr, busy_status, busy_latched;
  logic [5:0]  ext_mask;
  logic [AW-1:0] seq_end, seq_vaddr, sink_vaddr;
  logic        seq_vwe;
  logic [7:0]  seq_vwdata;
  logic        irq_req, clk_fail;
  logic [7:0]  status;

  // local bus
  logic [7:0]  lb_addr;
  logic        lb_wr, lb_rd;
  logic [15:0] lb_wdata, lb_rdata;

  // commands and event ID
  logic        crate_busy_sync, inhibit;
  logic        trig_osc, auto_trig, auto_ecr, trig_done, vetoed;
  fast_cmd_t   sa_cmd, ttc_cmd;
  logic        ttc_id_valid;
  logic [L1ID_W-1:0] ttc_l1id, l1id;
  logic [BCID_W-1:0] ttc_bcid, bcid;
  logic [TTID_W-1:0] ttc_ttid, ttid;
  logic        l1_wr, bc_wr;
  logic [EVID_W-1:0] id_dout;
  logic [TTID_W-1:0] tt_dout;
  logic        id_empty, id_full, id_ovf, id_rd;
  logic        tt_empty, tt_full, tt_ovf, tt_rd;
  logic [$clog2(FIFO_DEPTH):0] id_count, tt_count;
  logic        serial_id, serial_tt, ser_busy;
  bus_src_t    src;
  logic [7:0]  bus_next;

  // sequencer and sink
  logic          seq_running, sink_full;
  logic [7:0]    seq_word;
  logic [AW-1:0] seq_ram_addr, sink_ram_addr;
  logic          seq_ram_we, sink_ram_we;
  logic [7:0]    seq_ram_din, seq_ram_rdata, sink_ram_din, sink_ram_rdata;
  logic [AW:0]   sink_count;

  assign arst_n = rst_n && !reset_sw;

  // ---------------------------------------------------------------- clocks
  clock_select u_clock_select (
    .rst_n(arst_n), .xtal80, .nim_ext_clk, .ecl_ext_clk1, .ecl_ext_clk2,
    .enextclk(ctrl.enextclk), .enintclk(ctrl.enintclk), .samode(ctrl.samode),
    .clock40des1, .saclk_dly(saclk_dly_clk), .dl2_out, .dl3_out,
    .intclk, .clkin, .bc_clk, .clkinb4
  );

  prog_delay_line #(.SEL_W(8)) u_dl1 (.din(clkin),   .sel(saclk_dly), .dout(saclk_dly_clk));
  prog_delay_line #(.SEL_W(6)) u_dl2 (.din(bc_clk),  .sel(sw2),       .dout(dl2_out));
  prog_delay_line #(.SEL_W(6)) u_dl3 (.din(dl2_out), .sel(sw3),       .dout(dl3_out));
  prog_delay_line #(.SEL_W(6)) u_dl4 (.din(clkinb4), .sel(sw4),       .dout(pld_clk));

  assign bc_clk_out = {17{bc_clk}};
  assign clk_out    = dl2_out;

  // ------------------------------------------------------- VME and registers
  vme_interface u_vme (
    .clk(pld_clk), .rst_n(arst_n),
    .as_n(vme_as_n), .ds_n(vme_ds_n), .write_n(vme_write_n), .am(vme_am), .a(vme_a),
    .d_in(vme_d_in), .d_out(vme_d_out), .d_oe(vme_d_oe), .dtack_n(vme_dtack_n),
    .irq_n(vme_irq_n), .ga(vme_ga), .a32_mode(cfg_a32), .use_ga(cfg_use_ga),
    .base_preset(cfg_base), .lb_addr, .lb_wr, .lb_rd, .lb_wdata, .lb_rdata, .irq_req
  );

  assign clk_fail = !ctrl.samode && !ttcrx_ready;
  assign status   = {id_ovf || tt_ovf, id_full, id_empty, seq_running, sink_full,
                     ser_busy, crate_busy_sync, trig_done};

  tim_regs #(.N_RODS(N_RODS), .SEQ_DEPTH(SEQ_DEPTH)) u_regs (
    .clk(pld_clk), .rst_n(arst_n),
    .lb_addr, .lb_wr, .lb_rd, .lb_wdata, .lb_rdata,
    .ctrl, .vme_cmd, .seq_start, .seq_stop, .clr_ovf, .trig_period, .ecr_period, .window,
    .saclk_dly, .sa_ttid, .trig_dly, .busy_mask, .busy_clr, .ext_mask, .trig_num, .seq_end,
    .seq_vaddr, .seq_vwe, .seq_vwdata, .seq_rdata(seq_ram_rdata),
    .sink_vaddr, .sink_rdata(sink_ram_rdata), .sink_count,
    .busy_status, .busy_latched, .last_l1id(l1id), .last_bcid(bcid), .trig_cnt,
    .status, .clk_fail, .irq_req
  );

  // ----------------------------------------------------------------- busy
  rod_busy #(.N_RODS(N_RODS)) u_rod_busy (
    .clk(pld_clk), .rst_n(arst_n), .busy_in(rod_busy), .mask(busy_mask), .clr(busy_clr),
    .crate_busy, .crate_busy_sync, .status(busy_status), .latched(busy_latched)
  );
  assign inhibit = ctrl.busy_inhibit && crate_busy_sync;

  // -------------------------------------------------- stand-alone commands
  rate_oscillator u_trig_osc (
    .clk(pld_clk), .rst_n(arst_n), .en(ctrl.auto_trig), .period(trig_period), .pulse(trig_osc)
  );
  rate_oscillator u_ecr_osc (
    .clk(pld_clk), .rst_n(arst_n), .en(ctrl.auto_ecr), .period(ecr_period), .pulse(auto_ecr)
  );
  sa_gen_b u_sa_b (
    .clk(pld_clk), .rst_n(arst_n), .en(ctrl.auto_trig), .osc(trig_osc), .inhibit,
    .trig_num, .auto_trig, .trig_cnt, .done(trig_done)
  );
  sa_gen_a u_sa_a (
    .clk(pld_clk), .rst_n(arst_n), .vme_cmd, .ext_nim(ext_nim_cmd), .ext_ecl(ext_ecl_cmd),
    .ext_en(ctrl.ext_en), .ext_mask, .trigger_sw, .trig_delay(trig_dly),
    .auto_trig, .auto_ecr, .inhibit, .sa_cmd, .vetoed
  );

  // ------------------------------------------------------- Run-mode input
  ttc_interface u_ttc_if (
    .clk(pld_clk), .rst_n(arst_n),
    .l1accept(ttcrx_l1accept), .bcnt_res(ttcrx_bcnt_res), .evcnt_res(ttcrx_evcnt_res),
    .brcst(ttcrx_brcst), .brcst_str(ttcrx_brcst_str), .cnt_bus(ttcrx_cnt_bus),
    .bcnt_str(ttcrx_bcnt_str), .evcnt_lstr(ttcrx_evcnt_lstr), .evcnt_hstr(ttcrx_evcnt_hstr),
    .dout(ttcrx_dout), .dout_str(ttcrx_dout_str),
    .cmd(ttc_cmd), .id_valid(ttc_id_valid), .l1id(ttc_l1id), .bcid(ttc_bcid), .ttid(ttc_ttid)
  );

  // ------------------------------------------------------------- event ID
  l1id_gen u_l1id (
    .clk(pld_clk), .rst_n(arst_n), .samode(ctrl.samode), .sa_l1a(sa_cmd.l1a),
    .sa_ecr(sa_cmd.ecr), .ttc_id_valid, .ttc_l1id, .ev_wr(l1_wr), .l1id
  );
  bcid_ttid_gen u_bcid (
    .clk(pld_clk), .rst_n(arst_n), .samode(ctrl.samode), .sa_l1a(sa_cmd.l1a),
    .sa_bcr(sa_cmd.bcr), .sa_ttid, .ttc_id_valid, .ttc_bcid, .ttc_ttid,
    .ev_wr(bc_wr), .bcid, .ttid
  );

  tim_fifo #(.WIDTH(EVID_W), .DEPTH(FIFO_DEPTH)) u_id_fifo (
    .clk(pld_clk), .rst_n(arst_n), .wr_en(l1_wr), .din({l1id, bcid}), .rd_en(id_rd),
    .dout(id_dout), .empty(id_empty), .full(id_full), .overflow(id_ovf), .clr_ovf,
    .count(id_count)
  );
  tim_fifo #(.WIDTH(TTID_W), .DEPTH(FIFO_DEPTH)) u_tt_fifo (
    .clk(pld_clk), .rst_n(arst_n), .wr_en(bc_wr), .din(ttid), .rd_en(tt_rd),
    .dout(tt_dout), .empty(tt_empty), .full(tt_full), .overflow(tt_ovf), .clr_ovf,
    .count(tt_count)
  );

  serialiser u_serialiser (
    .clk(pld_clk), .rst_n(arst_n),
    .id_empty, .id_data(id_dout), .id_rd, .tt_empty, .tt_data(tt_dout), .tt_rd,
    .serial_id, .serial_tt, .busy(ser_busy)
  );

  // ------------------------------------------------- mapping and outputs
  assign src = ctrl.seq_mode ? SRC_SEQ : (ctrl.samode ? SRC_SA : SRC_RUN);

  output_mapping u_mapping (
    .src, .fer_from_ecr(ctrl.fer_from_ecr), .ttc_cmd, .sa_cmd, .serial_id, .serial_tt,
    .seq_word, .ttc_bus(bus_next)
  );

  ttc_output_reg u_out (
    .ttc_clk(dl2_out), .rst_n(arst_n), .d(bus_next), .ttc_a, .ttc_b
  );
  assign fp_ttc = ttc_a;

  // ---------------------------------------------------- sequencer and sink
  seq_sink #(.DEPTH(SEQ_DEPTH)) u_seq_sink (
    .clk(pld_clk), .rst_n(arst_n),
    .seq_start, .seq_stop, .seq_loop(ctrl.seq_loop), .seq_end, .seq_running, .seq_word,
    .seq_vaddr, .seq_vwe, .seq_vwdata,
    .seq_ram_addr, .seq_ram_we, .seq_ram_din, .seq_ram_rdata,
    .sink_en(ctrl.sink_en), .sink_word(ttc_a), .sink_vaddr, .sink_count, .sink_full,
    .sink_ram_addr, .sink_ram_we, .sink_ram_din
  );
  tim_ram #(.WIDTH(8), .DEPTH(SEQ_DEPTH)) u_seq_ram (
    .clk(pld_clk), .addr(seq_ram_addr), .we(seq_ram_we), .din(seq_ram_din), .rdata(seq_ram_rdata)
  );
  tim_ram #(.WIDTH(8), .DEPTH(SEQ_DEPTH)) u_sink_ram (
    .clk(pld_clk), .addr(sink_ram_addr), .we(sink_ram_we), .din(sink_ram_din), .rdata(sink_ram_rdata)
  );
endmodule
