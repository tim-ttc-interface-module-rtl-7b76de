// tim_top_tb: end-to-end test of the whole TIM at its default sizes (32k x 8
// sequencer and sink RAMs, 256-event FIFOs, 16 RODs).
//
// The test bench plays the local processor (VME master), the TTCrx (model),
// the front panel and the RODs, and watches the TTC bus on the backplane. A
// bus decoder in the test bench counts the fast commands, and decodes the
// Serial ID and Serial TT frames (start bit, MSB first, L1ID, BCID, trigger
// type). It predicts each frame's L1ID from the L1A and ECR commands it has
// seen on the bus (ECR clears, each L1A takes the next number), and compares.
// Sequence: register access; stand-alone VME commands with FER from ECR;
// automatic triggers at a fixed period (BCIDs must step by the period); a
// burst that queues events in the FIFOs; a long burst that overflows them;
// crate busy stopping triggers; external NIM trigger and trigger switch; the
// ECR oscillator; sequencer playback recorded by the sink and read back;
// switch to Run mode with TTCrx events, BCR, ECR and broadcast commands;
// clock-failure interrupt. Each mechanism is counted and must occur.
`timescale 1ns / 1ps
module tim_top_tb;
  import tim_pkg::*;

  // ------------------------------------------------------------ stimulus
  logic rst_n = 1, reset_sw = 0, xtal80 = 0;
  logic nim_ext_clk = 0, ecl_ext_clk1 = 0, ecl_ext_clk2 = 0;
  logic clock40des1;
  logic [5:0] sw2 = 6'd2, sw3 = 6'd2, sw4 = 6'd2;
  logic [16:0] bc_clk_out; logic clk_out;
  logic ttcrx_ready = 1;
  logic ttcrx_l1accept, ttcrx_bcnt_res, ttcrx_evcnt_res, ttcrx_brcst_str, ttcrx_bcnt_str;
  logic ttcrx_evcnt_lstr, ttcrx_evcnt_hstr, ttcrx_dout_str;
  logic [7:2] ttcrx_brcst; logic [11:0] ttcrx_cnt_bus; logic [7:0] ttcrx_dout;
  logic [5:0] ext_nim_cmd = '0, ext_ecl_cmd = '0; logic trigger_sw = 0;
  logic [7:0] fp_ttc, ttc_a, ttc_b;
  logic [15:0] rod_busy = '0; logic crate_busy;
  logic vme_as_n = 1, vme_write_n = 1; logic [1:0] vme_ds_n = 2'b11; logic [5:0] vme_am = 6'h39;
  logic [31:1] vme_a = '0; logic [15:0] vme_d_in = '0, vme_d_out; logic vme_d_oe, vme_dtack_n, vme_irq_n;
  logic [4:0] vme_ga = 5'd3;

  int checks = 0, failures = 0;

  always #6.2375 xtal80 = !xtal80;

  ttcrx_model u_ttcrx (.clock40des1, .l1accept(ttcrx_l1accept), .bcnt_res(ttcrx_bcnt_res),
    .evcnt_res(ttcrx_evcnt_res), .brcst(ttcrx_brcst), .brcst_str(ttcrx_brcst_str),
    .cnt_bus(ttcrx_cnt_bus), .bcnt_str(ttcrx_bcnt_str), .evcnt_lstr(ttcrx_evcnt_lstr),
    .evcnt_hstr(ttcrx_evcnt_hstr), .dout(ttcrx_dout), .dout_str(ttcrx_dout_str));

  tim_top dut (.rst_n, .reset_sw, .xtal80, .nim_ext_clk, .ecl_ext_clk1, .ecl_ext_clk2, .clock40des1,
    .sw2, .sw3, .sw4, .bc_clk_out, .clk_out, .ttcrx_ready, .ttcrx_l1accept, .ttcrx_bcnt_res,
    .ttcrx_evcnt_res, .ttcrx_brcst, .ttcrx_brcst_str, .ttcrx_cnt_bus, .ttcrx_bcnt_str,
    .ttcrx_evcnt_lstr, .ttcrx_evcnt_hstr, .ttcrx_dout, .ttcrx_dout_str, .ext_nim_cmd,
    .ext_ecl_cmd, .trigger_sw, .fp_ttc, .ttc_a, .ttc_b, .rod_busy, .crate_busy,
    .vme_as_n, .vme_ds_n, .vme_write_n, .vme_am, .vme_a, .vme_d_in, .vme_d_out, .vme_d_oe,
    .vme_dtack_n, .vme_irq_n, .vme_ga, .cfg_a32(1'b0), .cfg_use_ga(1'b1), .cfg_base(16'h0000));

  task automatic fail(input string what);
    failures++;
    if (failures < 20) $display("FAIL @%0t: %s", $time, what);
  endtask

  // --------------------------------------------------------- VME master
  // A24 cycles, base from geographical address 3: A23..A16 = 0x18
  task automatic vme_cycle(input logic [7:0] addr, input bit write, input logic [15:0] wd,
                           output logic [15:0] rd);
    int t = 0;
    vme_am = 6'h39; vme_a = {8'h00, 8'h18, 8'h00, addr[7:1]}; vme_write_n = !write; vme_d_in = wd;
    #10 vme_as_n = 0;
    #5 vme_ds_n = 2'b00;
    while (vme_dtack_n && t < 100) begin #5; t++; end
    if (vme_dtack_n) fail($sformatf("no DTACK for register %h", addr));
    rd = vme_d_out;
    #3 vme_ds_n = 2'b11; vme_as_n = 1;
    t = 0;
    while (!vme_dtack_n && t < 100) begin #5; t++; end
    #30;
  endtask
  task automatic wr(input logic [7:0] addr, input logic [15:0] d);
    logic [15:0] r; vme_cycle(addr, 1, d, r);
  endtask
  task automatic rd(input logic [7:0] addr, output logic [15:0] d);
    vme_cycle(addr, 0, 16'h0, d);
  endtask

  // ------------------------------------------------------- bus decoder
  logic ttc_clk;
  assign ttc_clk = clk_out;
  bit decode_on = 1;
  bit allow_gaps = 0;
  bit run_mode = 0;
  logic [TTID_W-1:0] sa_tt = '0;
  int unsigned l1id_pred = 0;
  logic [23:0] exp_l1id[$];
  logic [7:0]  run_tt[$];
  logic [11:0] run_bc[$];
  int n_l1a = 0, n_ecr = 0, n_bcr = 0, n_cal = 0, n_fer = 0, n_spare = 0, n_frames = 0, n_dropped = 0;
  int last_bcid = -1, bc_step = -1, n_bc_step_ok = 0, n_bc_step_bad = 0;
  int n_cyc = 0;

  initial begin
    logic [35:0] f_id; logic [9:0] f_tt;
    forever begin
      @(posedge ttc_clk); #0.2;
      n_cyc++;
      if (!decode_on) continue;
      if (ttc_a !== ttc_b || fp_ttc !== ttc_a) fail("TTC bus copies differ");
      if (ttc_a[TTC_ECR]) begin n_ecr++; l1id_pred = 0; end
      if (ttc_a[TTC_L1A]) begin n_l1a++; exp_l1id.push_back(24'(l1id_pred)); l1id_pred++; end
      if (ttc_a[TTC_BCR]) n_bcr++;
      if (ttc_a[TTC_CAL]) n_cal++;
      if (ttc_a[TTC_FER]) n_fer++;
      if (ttc_a[TTC_SPARE]) n_spare++;
    end
  end

  // serial frame receiver, runs beside the command counter
  initial begin
    logic [35:0] f_id; logic [9:0] f_tt;
    forever begin
      @(posedge ttc_clk); #0.3;
      if (!decode_on || !ttc_a[TTC_SID]) continue;
      checks++;
      if (!ttc_a[TTC_STT]) fail("Serial TT start bit missing");
      f_id = '0; f_tt = '0;
      for (int b = 0; b < 36; b++) begin
        @(posedge ttc_clk); #0.3;
        f_id = {f_id[34:0], ttc_a[TTC_SID]};
        if (b < 10) f_tt = {f_tt[8:0], ttc_a[TTC_STT]};
      end
      n_frames++;
      // L1ID
      while (allow_gaps && exp_l1id.size() > 1 && exp_l1id[0] != f_id[35:12]) begin
        void'(exp_l1id.pop_front()); n_dropped++;
      end
      checks++;
      if (exp_l1id.size() == 0) fail("frame without an L1A");
      else begin
        if (f_id[35:12] !== exp_l1id[0]) fail($sformatf("frame L1ID %0d expected %0d", f_id[35:12], exp_l1id[0]));
        void'(exp_l1id.pop_front());
      end
      // trigger type and, in Run mode, BCID
      checks++;
      if (run_mode) begin
        if (run_tt.size() == 0 || f_tt !== {2'b00, run_tt[0]} || f_id[11:0] !== run_bc[0])
          fail($sformatf("Run frame tt %h bcid %0d", f_tt, f_id[11:0]));
        if (run_tt.size() != 0) begin void'(run_tt.pop_front()); void'(run_bc.pop_front()); end
      end else begin
        if (f_tt !== sa_tt) fail($sformatf("frame TT %h expected %h", f_tt, sa_tt));
        if (bc_step > 0 && last_bcid >= 0) begin
          if (int'(f_id[11:0]) == (last_bcid + bc_step) % 4096) n_bc_step_ok++;
          else n_bc_step_bad++;
        end
      end
      last_bcid = int'(f_id[11:0]);
    end
  end

  // FIFO depth seen (queueing)
  int max_queue = 0;
  always @(posedge dut.pld_clk) if (int'(dut.id_count) > max_queue) max_queue = int'(dut.id_count);

  // independent model of the TTCrx bunch counter
  int unsigned run_bc_model = 0;
  always @(posedge clock40des1) run_bc_model <= ttcrx_bcnt_res ? 0 : (run_bc_model + 1) % 4096;

  task automatic run_trig(input logic [7:0] tt);
    @(negedge clock40des1); #2;
    run_tt.push_back(tt);
    run_bc.push_back(12'((run_bc_model + 1) % 4096));
    u_ttcrx.l1a(tt);
  endtask

  task automatic wait_cycles(input int n);
    repeat (n) @(posedge ttc_clk);
  endtask

  task automatic wait_drain();
    int t = 0;
    while ((dut.id_count != 0 || dut.ser_busy) && t < 20000) begin @(posedge ttc_clk); t++; end
    wait_cycles(50);
  endtask

  // mechanisms
  int m_vme_rw = 0, m_vme_cmd = 0, m_auto = 0, m_queue = 0, m_overflow = 0, m_busy_stall = 0;
  int m_ext = 0, m_sw = 0, m_ecr_osc = 0, m_fer = 0, m_seq = 0, m_sink = 0, m_run = 0;
  int m_mode = 0, m_irq = 0, m_bcid_step = 0, m_cal = 0;

  task automatic expect_count(input int got, input int exp, input string what);
    checks++;
    if (got != exp) fail($sformatf("%s: %0d, expected %0d", what, got, exp));
  endtask

  initial begin
    #20ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [15:0] r;
    int n0, f0, e0;
    #1 rst_n = 0;   // a real falling edge: the reset is asynchronous
    #100 rst_n = 1;
    #500;
    // ---- register access
    wr(REG_TTID, 16'h0155); sa_tt = 10'h155;
    rd(REG_TTID, r);
    expect_count(int'(r), 16'h155, "TTID register read-back");
    rd(REG_CTRL, r);
    expect_count(int'(r), 3, "control register after reset");
    m_vme_rw++;
    // ---- SA mode, VME commands; FER with ECR
    wr(REG_CTRL, 16'h0013);          // samode, enintclk, fer_from_ecr
    n0 = n_l1a;
    wr(REG_CMD, 16'h0002);           // ECR
    wr(REG_CMD, 16'h0001);           // L1A
    wr(REG_CMD, 16'h0001);
    wr(REG_CMD, 16'h0008);           // CAL
    wr(REG_CMD, 16'h0004);           // BCR
    wait_drain();
    expect_count(n_l1a - n0, 2, "VME L1A");
    checks++; if (n_fer == 0 || n_fer != n_ecr) fail("FER not sent with ECR"); else m_fer++;
    checks++; if (n_cal == 0 || n_bcr == 0) fail("CAL/BCR"); else m_vme_cmd++;
    expect_count(n_frames, 2, "frames after VME triggers");
    // ---- automatic triggers, period 50, 20 triggers
    bc_step = 50; last_bcid = -1;
    n0 = n_l1a; f0 = n_frames;
    wr(REG_TRIG_PER, 16'd50); wr(REG_TRIG_NUM, 16'd20);
    wr(REG_CTRL, 16'h0033);          // + auto_trig
    wait_cycles(20 * 50 + 100);
    wait_drain();
    expect_count(n_l1a - n0, 20, "automatic triggers");
    expect_count(n_frames - f0, 20, "frames of automatic triggers");
    checks++; if (n_bc_step_ok < 19 || n_bc_step_bad != 0) fail($sformatf("BCID steps %0d/%0d", n_bc_step_ok, n_bc_step_bad));
    else begin m_auto++; m_bcid_step++; end
    bc_step = -1;
    rd(REG_TRIG_CNT, r);
    expect_count(int'(r), 20, "trigger count register");
    wr(REG_CTRL, 16'h0013);
    // ---- queueing: 40 triggers, one every 2 cycles
    n0 = n_l1a; f0 = n_frames;
    wr(REG_TRIG_PER, 16'd2); wr(REG_TRIG_NUM, 16'd40);
    wr(REG_CTRL, 16'h0033);
    wait_cycles(200);
    wait_drain();
    expect_count(n_l1a - n0, 40, "burst triggers");
    expect_count(n_frames - f0, 40, "burst frames");
    checks++; if (max_queue < 30) fail($sformatf("queue depth %0d", max_queue)); else m_queue++;
    wr(REG_CTRL, 16'h0013);
    // ---- overflow: a trigger every cycle for 1000 cycles
    allow_gaps = 1;
    wr(REG_TRIG_PER, 16'd1); wr(REG_TRIG_NUM, 16'd1000);
    wr(REG_CTRL, 16'h0033);
    wait_cycles(1100);
    rd(REG_STATUS, r);
    checks++; if (!r[7]) fail("FIFO overflow not reported"); else m_overflow++;
    wr(REG_CTRL, 16'h0013);
    wait_drain();
    wr(REG_CMD, 16'h0100);           // clear overflow
    rd(REG_STATUS, r);
    checks++; if (r[7]) fail("overflow flag not cleared");
    checks++; if (n_dropped == 0) fail("no events dropped in overflow");
    allow_gaps = 0;
    exp_l1id.delete();
    // ---- crate busy stops automatic triggers
    wr(REG_BUSY_MASK, 16'h00FF);
    wr(REG_TRIG_PER, 16'd20); wr(REG_TRIG_NUM, 16'd0);
    wr(REG_CTRL, 16'h0133);          // + busy_inhibit
    wait_cycles(200);
    rod_busy[12] = 1; #50;           // masked: no effect
    checks++; if (crate_busy) fail("masked busy reached the crate busy");
    rod_busy[3] = 1; #5;
    checks++; if (!crate_busy) fail("crate busy not set");
    wait_cycles(5);
    n0 = n_l1a;
    wait_cycles(400);
    checks++; if (n_l1a != n0) fail("triggers while busy"); else m_busy_stall++;
    rd(REG_BUSY_LAT, r);
    checks++; if (r[3] !== 1'b1 || r[12] !== 1'b1) fail("busy latch");
    rod_busy = '0;
    wait_cycles(200);
    checks++; if (n_l1a == n0) fail("triggers did not resume after busy");
    wr(REG_CTRL, 16'h0013);
    wait_drain();
    exp_l1id.delete();
    // ---- external NIM trigger with delay, trigger switch
    n0 = n_l1a;
    wr(REG_EXT_MASK, 16'h003F); wr(REG_TRIG_DLY, 16'd5);
    wr(REG_CTRL, 16'h0093);          // + ext_en
    #100 ext_nim_cmd[0] = 1; #300 ext_nim_cmd[0] = 0;
    wait_cycles(30);
    checks++; if (n_l1a != n0 + 1) fail("external trigger"); else m_ext++;
    #100 trigger_sw = 1; #300 trigger_sw = 0;
    wait_cycles(30);
    checks++; if (n_l1a != n0 + 2) fail("trigger switch"); else m_sw++;
    wr(REG_CTRL, 16'h0013);
    wait_drain();
    // ---- ECR oscillator
    e0 = n_ecr;
    wr(REG_ECR_PER, 16'd100);
    wr(REG_CTRL, 16'h0053);          // + auto_ecr
    wait_cycles(1000);
    wr(REG_CTRL, 16'h0013);
    checks++; if (n_ecr - e0 < 8 || n_ecr - e0 > 12) fail($sformatf("ECR oscillator %0d", n_ecr - e0)); else m_ecr_osc++;
    wr(REG_CMD, 16'h0001);           // next event must carry L1ID 0
    wait_drain();
    checks++; if (last_bcid < 0 || exp_l1id.size() != 0) fail("event after ECR");
    // ---- sequencer and sink
    wr(REG_SEQ_ADDR, 16'd0);
    for (int i = 0; i < 16; i++) wr(REG_SEQ_DATA, 16'(8'(i * 16 + 5)));
    wr(REG_SEQ_END, 16'd15);
    decode_on = 0;
    wr(REG_CTRL, 16'h081B);          // + seq_mode, sink_en
    wr(REG_CMD, 16'h0040);           // start
    wait_cycles(60);
    wr(REG_CTRL, 16'h0013);
    begin
      int found = -1, cnt;
      logic [15:0] sc;
      rd(REG_SINK_CNT, sc);
      wr(REG_SINK_ADDR, 16'd0);
      for (int i = 0; i < int'(sc) && i < 400; i++) begin
        rd(REG_SINK_DATA, r);
        if (found < 0 && r[7:0] == 8'h05) found = i;
        if (found >= 0 && i - found < 16) begin
          checks++;
          if (r[7:0] !== 8'((i - found) * 16 + 5)) fail($sformatf("sink word %0d = %h", i - found, r));
        end
      end
      checks++;
      if (found < 0 || sc < 40) fail("sequence not found in the sink"); else begin m_seq++; m_sink++; end
    end
    decode_on = 1;
    exp_l1id.delete();
    // ---- Run mode
    wr(REG_CTRL, 16'h0012);          // samode = 0: TTCrx clock
    run_mode = 1; m_mode++;
    wait_cycles(20);
    u_ttcrx.bcr();
    u_ttcrx.ecr();
    wait_cycles(10);
    n0 = n_l1a; f0 = n_frames;
    for (int i = 0; i < 12; i++) begin
      run_trig(8'(i * 7 + 1));
      repeat ($urandom % 30) @(negedge clock40des1);
    end
    u_ttcrx.brcst_cmd(6'b000001);    // CAL
    u_ttcrx.brcst_cmd(6'b000100);    // spare
    wait_cycles(100);
    wait_drain();
    expect_count(n_l1a - n0, 12, "Run-mode L1A");
    expect_count(n_frames - f0, 12, "Run-mode frames");
    checks++; if (n_spare == 0) fail("broadcast spare command"); else begin m_run++; m_cal++; end
    // clock failure interrupt
    wr(REG_CTRL, 16'h0412);          // + irq_en
    ttcrx_ready = 0; #100;
    checks++; if (vme_irq_n) fail("no interrupt on clock failure"); else m_irq++;
    ttcrx_ready = 1;
    // back to SA
    wr(REG_CTRL, 16'h0013); run_mode = 0; m_mode++;
    wait_cycles(50);
    // ---- mechanisms
    begin
      automatic int m[18] = '{m_vme_rw, m_vme_cmd, m_auto, m_queue, m_overflow, m_busy_stall, m_ext, m_sw,
                    m_ecr_osc, m_fer, m_seq, m_sink, m_run, m_mode, m_irq, m_bcid_step, m_cal, n_frames};
      string nm[18] = '{"register access", "VME commands", "automatic triggers", "event queueing",
                        "FIFO overflow", "busy stall", "external trigger", "trigger switch",
                        "ECR oscillator", "FER from ECR", "sequencer", "sink", "Run mode events",
                        "mode switch", "interrupt", "BCID steps", "broadcast commands", "frames"};
      for (int i = 0; i < 18; i++) begin
        $display("mechanism %-20s : %0d", nm[i], m[i]);
        checks++; if (m[i] == 0) fail($sformatf("mechanism never happened: %s", nm[i]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
