// l1id_gen_tb: self-checking test of l1id_gen. In SA mode a random stream of
// L1A and ECR pulses is compared with a software counter (ECR first, first
// event after ECR = 0); in Run mode the TTC event numbers must pass through.
// The write strobe must follow its cause by exactly one cycle.
`timescale 1ns / 1ps
module l1id_gen_tb;
  import tim_pkg::*;
  logic clk = 0, rst_n = 0, samode = 1, sa_l1a = 0, sa_ecr = 0, ttc_id_valid = 0;
  logic [L1ID_W-1:0] ttc_l1id = '0, l1id;
  logic ev_wr;
  int checks = 0, failures = 0;

  l1id_gen dut (.*);
  always #5 clk = !clk;

  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int unsigned model = 0;
    bit exp_wr; logic [23:0] exp_id;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      sa_l1a = ($urandom % 3) == 0;
      sa_ecr = ($urandom % 23) == 0;
      if (sa_ecr) model = 0;
      exp_wr = sa_l1a; exp_id = 24'(model);
      if (sa_l1a) model++;
      @(negedge clk);
      checks++;
      if (ev_wr !== exp_wr || (exp_wr && l1id !== exp_id)) begin
        failures++; $display("FAIL: SA step %0d wr %b id %0d expected %b %0d", i, ev_wr, l1id, exp_wr, exp_id);
      end
    end
    sa_l1a = 0; sa_ecr = 0;
    // counter wraps at 24 bits: not exercised; Run mode pass-through
    samode = 0;
    for (int i = 0; i < 50; i++) begin
      ttc_id_valid = ($urandom % 2) != 0;
      ttc_l1id = 24'($urandom);
      sa_l1a = 1;   // ignored in Run mode
      exp_wr = ttc_id_valid; exp_id = ttc_l1id;
      @(negedge clk);
      checks++;
      if (ev_wr !== exp_wr || (exp_wr && l1id !== exp_id)) begin
        failures++; $display("FAIL: Run step %0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
