// bcid_ttid_gen_tb: self-checking test of bcid_ttid_gen. A software bunch
// counter (cleared by BCR, +1 per clock, 12-bit wrap) predicts the BCID
// captured at each L1A in SA mode; the trigger type must come from the SA
// register in SA mode and from the TTC side in Run mode. The counter is left
// running past 4095 to check the wrap.
`timescale 1ns / 1ps
module bcid_ttid_gen_tb;
  import tim_pkg::*;
  logic clk = 0, rst_n = 0, samode = 1, sa_l1a = 0, sa_bcr = 0, ttc_id_valid = 0;
  logic [TTID_W-1:0] sa_ttid = 10'h2A5, ttc_ttid = '0, ttid;
  logic [BCID_W-1:0] ttc_bcid = '0, bcid;
  logic ev_wr;
  int checks = 0, failures = 0;

  bcid_ttid_gen dut (.*);
  always #5 clk = !clk;

  initial begin
    #500000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int unsigned bc = 0;
    bit exp_wr; logic [11:0] exp_bc;
    repeat (2) @(negedge clk);
    rst_n = 1;
    bc = 0;  // counter is 0 in the first cycle after reset
    for (int i = 0; i < 9000; i++) begin
      sa_l1a = ($urandom % 5) == 0;
      sa_bcr = (i == 100) || (i == 5000) || (($urandom % 3000) == 0);
      if (i % 97 == 0) sa_ttid = 10'($urandom);
      exp_wr = sa_l1a; exp_bc = 12'(bc);
      @(negedge clk);
      bc = sa_bcr ? 0 : (bc + 1) % 4096;
      checks++;
      if (ev_wr !== exp_wr || (exp_wr && (bcid !== exp_bc || ttid !== sa_ttid))) begin
        failures++;
        if (failures < 10) $display("FAIL: step %0d wr %b bcid %0d exp %0d", i, ev_wr, bcid, exp_bc);
      end
    end
    sa_l1a = 0; sa_bcr = 0;
    samode = 0;
    for (int i = 0; i < 50; i++) begin
      ttc_id_valid = ($urandom % 2) != 0;
      ttc_bcid = 12'($urandom); ttc_ttid = 10'($urandom);
      exp_wr = ttc_id_valid;
      @(negedge clk);
      checks++;
      if (ev_wr !== exp_wr || (exp_wr && (bcid !== ttc_bcid || ttid !== ttc_ttid))) begin
        failures++; $display("FAIL: Run step %0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
