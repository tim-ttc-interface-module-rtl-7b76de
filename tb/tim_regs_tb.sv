// tim_regs_tb: self-checking test of tim_regs on its local bus. Read/write
// registers must read back what was written; status inputs must read as
// given; a write to the command register must give one-cycle pulses; the
// sequencer RAM (a tim_ram here) must be written and read through the data
// register with the address moving on after each access.
`timescale 1ns / 1ps
module tim_regs_tb;
  import tim_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] lb_addr = '0; logic lb_wr = 0, lb_rd = 0; logic [15:0] lb_wdata = '0, lb_rdata;
  ctrl_t ctrl; fast_cmd_t vme_cmd; logic seq_start, seq_stop, clr_ovf;
  logic [15:0] trig_period, ecr_period, window, trig_num;
  logic [7:0] saclk_dly, trig_dly; logic [TTID_W-1:0] sa_ttid;
  logic [15:0] busy_mask, busy_clr; logic [5:0] ext_mask; logic [14:0] seq_end, seq_vaddr, sink_vaddr;
  logic seq_vwe; logic [7:0] seq_vwdata, seq_rdata, sink_rdata = 8'h5A;
  logic [15:0] sink_count = 16'd1234;
  logic [15:0] busy_status = 16'hBEEF, busy_latched = 16'h1357;
  logic [23:0] last_l1id = 24'hABCDEF; logic [11:0] last_bcid = 12'h321;
  logic [15:0] trig_cnt = 16'd77; logic [7:0] status = 8'hA5; logic clk_fail = 0, irq_req;
  int checks = 0, failures = 0;
  int n_start = 0, n_cmd = 0;

  tim_regs dut (.*);
  tim_ram #(.WIDTH(8), .DEPTH(32768)) u_ram (.clk, .addr(seq_vaddr), .we(seq_vwe), .din(seq_vwdata), .rdata(seq_rdata));
  always #5 clk = !clk;
  always @(posedge clk) begin
    if (seq_start) n_start++;
    if (vme_cmd != NO_CMD) n_cmd++;
  end

  task automatic wr(input logic [7:0] a, input logic [15:0] d);
    @(negedge clk); lb_addr = a; lb_wdata = d; lb_wr = 1; @(negedge clk); lb_wr = 0;
    repeat (2) @(negedge clk);
  endtask
  task automatic rd(input logic [7:0] a, output logic [15:0] d);
    @(negedge clk); lb_addr = a; #1; d = lb_rdata; lb_rd = 1; @(negedge clk); lb_rd = 0;
    repeat (2) @(negedge clk);
  endtask
  task automatic chk(input logic [7:0] a, input logic [15:0] exp);
    logic [15:0] d;
    rd(a, d);
    checks++;
    if (d !== exp) begin failures++; $display("FAIL: reg %h = %h expected %h", a, d, exp); end
  endtask

  initial begin
    #500000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [15:0] d;
    repeat (2) @(negedge clk); rst_n = 1;
    chk(REG_CTRL, 16'h0003);
    chk(REG_BUSY_MASK, 16'hFFFF);
    wr(REG_CTRL, 16'h0FF5);       chk(REG_CTRL, 16'h0FF5);
    checks++; if (!ctrl.samode || !ctrl.irq_en || !ctrl.sink_en) failures++;
    wr(REG_TRIG_PER, 16'd400);    chk(REG_TRIG_PER, 16'd400);
    wr(REG_ECR_PER, 16'd9000);    chk(REG_ECR_PER, 16'd9000);
    wr(REG_WINDOW, 16'h1234);     chk(REG_WINDOW, 16'h1234);
    wr(REG_SACLK_DLY, 16'hFF42);  chk(REG_SACLK_DLY, 16'h0042);
    wr(REG_TTID, 16'hFFFF);       chk(REG_TTID, 16'h03FF);
    wr(REG_TRIG_DLY, 16'h0017);   chk(REG_TRIG_DLY, 16'h0017);
    wr(REG_BUSY_MASK, 16'h00F0);  chk(REG_BUSY_MASK, 16'h00F0);
    wr(REG_EXT_MASK, 16'h00FF);   chk(REG_EXT_MASK, 16'h003F);
    wr(REG_TRIG_NUM, 16'd12);     chk(REG_TRIG_NUM, 16'd12);
    wr(REG_SEQ_END, 16'h7FFF);    chk(REG_SEQ_END, 16'h7FFF);
    checks++; if (trig_period != 400 || saclk_dly != 8'h42 || busy_mask != 16'h00F0) failures++;
    chk(REG_BUSY_STAT, 16'hBEEF); chk(REG_BUSY_LAT, 16'h1357);
    chk(REG_L1ID_LO, 16'hCDEF);   chk(REG_L1ID_HI, 16'h00AB);
    chk(REG_BCID, 16'h0321);      chk(REG_TRIG_CNT, 16'd77);
    chk(REG_SINK_CNT, 16'd1234);  chk(REG_STATUS, 16'h00A5);
    clk_fail = 1; #1;
    checks++; if (!irq_req) begin failures++; $display("FAIL: irq"); end
    chk(REG_STATUS, 16'h01A5);
    clk_fail = 0;
    // command pulses
    wr(REG_CMD, 16'h0041);
    checks++; if (n_start != 1 || n_cmd != 1) begin failures++; $display("FAIL: command pulses %0d %0d", n_start, n_cmd); end
    // sequencer RAM through address/data registers
    wr(REG_SEQ_ADDR, 16'd100);
    for (int i = 0; i < 8; i++) wr(REG_SEQ_DATA, 16'(8'(i * 11 + 3)));
    chk(REG_SEQ_ADDR, 16'd108);
    wr(REG_SEQ_ADDR, 16'd100);
    for (int i = 0; i < 8; i++) chk(REG_SEQ_DATA, 16'(8'(i * 11 + 3)));
    wr(REG_SINK_ADDR, 16'd5); chk(REG_SINK_DATA, 16'h005A); chk(REG_SINK_ADDR, 16'd6);
    // busy latch clear pulse
    fork
      wr(REG_BUSY_LAT, 16'h0003);
      begin wait (lb_wr); #1; checks++; if (busy_clr != 16'h0003) begin failures++; $display("FAIL: busy clear"); end end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
