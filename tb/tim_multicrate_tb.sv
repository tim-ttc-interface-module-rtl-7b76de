// tim_multicrate_tb: two TIMs at full default size linked for stand-alone
// multi-crate operation, one driving the other.
//
// The master runs in stand-alone mode on its own crystal. Its front-panel
// clock output feeds the slave's first ECL clock input, and its front-panel
// copy of the TTC bus feeds the slave's ECL command inputs (L1A, ECR, BCR,
// CAL, FER and spare lines). The slave runs in stand-alone mode on that
// external clock with its external command inputs enabled. Both modules sit
// on one VME bus at geographical addresses 3 and 4. The master then sends
// VME commands (BCR, ECR, CAL) and a train of oscillator triggers. The test
// bench decodes both backplane buses and checks that the slave issues
// the same number of each fast command, the same sequence of L1IDs in its
// event ID frames, and BCIDs that keep the master's spacing, which the
// master's trigger period fixes. Triggers are spaced well apart because the
// external inputs are edge-detected.
`timescale 1ns / 1ps
module tim_multicrate_tb;
  import tim_pkg::*;

  localparam int N_TRIG = 40;
  localparam int PERIOD = 45;

  logic rst_n = 1, xtal80 = 0;
  logic [5:0] sw = 6'd2;
  logic [16:0] m_bc, s_bc; logic m_clk_out, s_clk_out;
  logic [7:0] m_fp, s_fp, m_a, m_b, s_a, s_b;
  logic m_busy, s_busy;
  logic vme_as_n = 1, vme_write_n = 1; logic [1:0] vme_ds_n = 2'b11; logic [5:0] vme_am = 6'h39;
  logic [31:1] vme_a = '0; logic [15:0] vme_d_in = '0;
  logic [15:0] m_dout, s_dout; logic m_oe, s_oe, m_dtack_n, s_dtack_n, m_irq_n, s_irq_n;
  logic [15:0] vme_d; logic vme_dtack_n;
  logic [5:0] s_ext;

  int checks = 0, failures = 0;

  always #6.2375 xtal80 = !xtal80;

  assign vme_d       = m_oe ? m_dout : s_dout;
  assign vme_dtack_n = m_dtack_n && s_dtack_n;
  // front-panel bus of the master onto the slave's command inputs (fast_cmd_t order)
  assign s_ext = {m_fp[TTC_SPARE], m_fp[TTC_FER], m_fp[TTC_CAL], m_fp[TTC_BCR], m_fp[TTC_ECR], m_fp[TTC_L1A]};

  tim_top master (.rst_n, .reset_sw(1'b0), .xtal80, .nim_ext_clk(1'b0), .ecl_ext_clk1(1'b0),
    .ecl_ext_clk2(1'b0), .clock40des1(1'b0), .sw2(sw), .sw3(sw), .sw4(sw), .bc_clk_out(m_bc),
    .clk_out(m_clk_out), .ttcrx_ready(1'b0), .ttcrx_l1accept(1'b0), .ttcrx_bcnt_res(1'b0),
    .ttcrx_evcnt_res(1'b0), .ttcrx_brcst(6'd0), .ttcrx_brcst_str(1'b0), .ttcrx_cnt_bus(12'd0),
    .ttcrx_bcnt_str(1'b0), .ttcrx_evcnt_lstr(1'b0), .ttcrx_evcnt_hstr(1'b0), .ttcrx_dout(8'd0),
    .ttcrx_dout_str(1'b0), .ext_nim_cmd(6'd0), .ext_ecl_cmd(6'd0), .trigger_sw(1'b0),
    .fp_ttc(m_fp), .ttc_a(m_a), .ttc_b(m_b), .rod_busy(16'd0), .crate_busy(m_busy),
    .vme_as_n, .vme_ds_n, .vme_write_n, .vme_am, .vme_a, .vme_d_in, .vme_d_out(m_dout),
    .vme_d_oe(m_oe), .vme_dtack_n(m_dtack_n), .vme_irq_n(m_irq_n), .vme_ga(5'd3),
    .cfg_a32(1'b0), .cfg_use_ga(1'b1), .cfg_base(16'h0000));

  tim_top slave (.rst_n, .reset_sw(1'b0), .xtal80, .nim_ext_clk(1'b0), .ecl_ext_clk1(m_clk_out),
    .ecl_ext_clk2(1'b0), .clock40des1(1'b0), .sw2(sw), .sw3(sw), .sw4(sw), .bc_clk_out(s_bc),
    .clk_out(s_clk_out), .ttcrx_ready(1'b0), .ttcrx_l1accept(1'b0), .ttcrx_bcnt_res(1'b0),
    .ttcrx_evcnt_res(1'b0), .ttcrx_brcst(6'd0), .ttcrx_brcst_str(1'b0), .ttcrx_cnt_bus(12'd0),
    .ttcrx_bcnt_str(1'b0), .ttcrx_evcnt_lstr(1'b0), .ttcrx_evcnt_hstr(1'b0), .ttcrx_dout(8'd0),
    .ttcrx_dout_str(1'b0), .ext_nim_cmd(6'd0), .ext_ecl_cmd(s_ext), .trigger_sw(1'b0),
    .fp_ttc(s_fp), .ttc_a(s_a), .ttc_b(s_b), .rod_busy(16'd0), .crate_busy(s_busy),
    .vme_as_n, .vme_ds_n, .vme_write_n, .vme_am, .vme_a, .vme_d_in, .vme_d_out(s_dout),
    .vme_d_oe(s_oe), .vme_dtack_n(s_dtack_n), .vme_irq_n(s_irq_n), .vme_ga(5'd4),
    .cfg_a32(1'b0), .cfg_use_ga(1'b1), .cfg_base(16'h0000));

  // ------------------------------------------------------------ VME master
  task automatic vme_cycle(input logic [4:0] slot, input logic [7:0] addr, input bit write,
                           input logic [15:0] wd, output logic [15:0] rd);
    int t = 0;
    vme_a = {8'h00, slot, 3'b000, 8'h00, addr[7:1]}; vme_write_n = !write; vme_d_in = wd;
    #10 vme_as_n = 0;
    #5 vme_ds_n = 2'b00;
    while (vme_dtack_n && t < 200) begin #5; t++; end
    checks++;
    if (vme_dtack_n) begin failures++; $display("FAIL: no DTACK slot %0d reg %h", slot, addr); end
    rd = vme_d;
    #3 vme_ds_n = 2'b11; vme_as_n = 1;
    t = 0;
    while (!vme_dtack_n && t < 200) begin #5; t++; end
    #30;
  endtask
  task automatic wr(input logic [4:0] slot, input logic [7:0] addr, input logic [15:0] d);
    logic [15:0] r; vme_cycle(slot, addr, 1, d, r);
  endtask
  task automatic rd(input logic [4:0] slot, input logic [7:0] addr, output logic [15:0] d);
    vme_cycle(slot, addr, 0, 16'h0, d);
  endtask

  // ------------------------------------------------------------ monitors
  logic mf_v, sf_v; logic [23:0] mf_l1, sf_l1; logic [11:0] mf_bc, sf_bc; logic [9:0] mf_tt, sf_tt;
  int m_l1a, m_ecr, m_bcr, m_cal, m_fer, m_frames, m_bad;
  int s_l1a, s_ecr, s_bcr, s_cal, s_fer, s_frames, s_bad;

  ttc_frame_monitor mon_m (.clk(m_clk_out), .bus(m_a), .frame_valid(mf_v), .l1id(mf_l1), .bcid(mf_bc),
    .ttid(mf_tt), .n_l1a(m_l1a), .n_ecr(m_ecr), .n_bcr(m_bcr), .n_cal(m_cal), .n_fer(m_fer),
    .n_frames(m_frames), .n_bad_start(m_bad));
  ttc_frame_monitor mon_s (.clk(s_clk_out), .bus(s_a), .frame_valid(sf_v), .l1id(sf_l1), .bcid(sf_bc),
    .ttid(sf_tt), .n_l1a(s_l1a), .n_ecr(s_ecr), .n_bcr(s_bcr), .n_cal(s_cal), .n_fer(s_fer),
    .n_frames(s_frames), .n_bad_start(s_bad));

  logic [23:0] m_ids[$], s_ids[$];
  int m_bcids[$], s_bcids[$];
  logic [9:0] s_tts[$];
  always @(posedge mf_v) begin m_ids.push_back(mf_l1); m_bcids.push_back(int'(mf_bc)); end
  always @(posedge sf_v) begin s_ids.push_back(sf_l1); s_bcids.push_back(int'(sf_bc)); s_tts.push_back(sf_tt); end

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL: %s: %0d, expected %0d", what, got, exp); end
  endtask

  // ------------------------------------------------------------ sequence
  initial begin
    logic [15:0] r;
    #1 rst_n = 0;   // a real falling edge: the reset is asynchronous
    #200 rst_n = 1;
    #500;
    // slave: SA mode on the external clock, external commands enabled
    wr(5'd4, REG_EXT_MASK, 16'h003F);
    wr(5'd4, REG_TTID, 16'h0155);
    wr(5'd4, REG_CTRL, 16'h0085);          // samode, enextclk, ext_en
    #2000;
    rd(5'd4, REG_CTRL, r);
    expect_eq(int'(r), 16'h0085, "slave control register");
    rd(5'd3, REG_CTRL, r);
    expect_eq(int'(r), 16'h0003, "master control register after reset");
    // master: commands by VME
    wr(5'd3, REG_CMD, 16'h0004);           // BCR
    #500 wr(5'd3, REG_CMD, 16'h0002);      // ECR
    #500 wr(5'd3, REG_CMD, 16'h0008);      // CAL
    #500 wr(5'd3, REG_CMD, 16'h0001);      // single L1A
    #3000;
    // master: train of N_TRIG oscillator triggers
    wr(5'd3, REG_TRIG_NUM, 16'(N_TRIG));
    wr(5'd3, REG_TRIG_PER, 16'(PERIOD));
    wr(5'd3, REG_CTRL, 16'h0023);          // samode, enintclk, auto_trig
    wait (m_frames >= N_TRIG + 1);
    #20000;
    // second ECR, then two more triggers
    wr(5'd3, REG_CTRL, 16'h0003);
    wr(5'd3, REG_CMD, 16'h0002);
    #500 wr(5'd3, REG_CMD, 16'h0001);
    #500 wr(5'd3, REG_CMD, 16'h0001);
    #5000;

    // ---- comparison
    expect_eq(m_l1a, N_TRIG + 3, "master L1As");
    expect_eq(s_l1a, m_l1a, "slave L1As");
    expect_eq(s_ecr, m_ecr, "slave ECRs");
    expect_eq(m_ecr, 2, "master ECRs");
    expect_eq(s_bcr, m_bcr, "slave BCRs");
    expect_eq(s_cal, m_cal, "slave CALs");
    expect_eq(m_cal, 1, "master CALs");
    expect_eq(s_frames, m_frames, "slave frames");
    expect_eq(m_bad + s_bad, 0, "frame start bits");
    for (int i = 0; i < m_ids.size() && i < s_ids.size(); i++) begin
      expect_eq(int'(s_ids[i]), int'(m_ids[i]), $sformatf("slave L1ID of frame %0d", i));
      expect_eq(int'(s_tts[i]), 'h155, $sformatf("slave trigger type of frame %0d", i));
    end
    for (int i = 2; i < N_TRIG && i < s_bcids.size(); i++)
      expect_eq((s_bcids[i] - s_bcids[i-1] + 4096) % 4096, (m_bcids[i] - m_bcids[i-1] + 4096) % 4096,
                $sformatf("slave BCID spacing at frame %0d", i));
    expect_eq(int'(m_ids[m_ids.size()-1]), 1, "master L1ID after second ECR");
    $display("multi-crate: master L1A %0d ECR %0d BCR %0d CAL %0d frames %0d; slave L1A %0d frames %0d",
             m_l1a, m_ecr, m_bcr, m_cal, m_frames, s_l1a, s_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
