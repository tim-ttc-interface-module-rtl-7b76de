// clock_select_tb: self-checking test of clock_select. Counts rising edges
// over a fixed time: the internal clock must run at half the crystal rate;
// CLKIN must carry the internal clock, an external clock or nothing according
// to the enables; the BC clock and the logic clock path must follow the mode.
`timescale 1ns / 1ps
module clock_select_tb;
  logic rst_n = 0, xtal80 = 0, nim_ext_clk = 0, ecl_ext_clk1 = 0, ecl_ext_clk2 = 0;
  logic enextclk = 0, enintclk = 0, samode = 0;
  logic clock40des1 = 0, saclk_dly = 0, dl2_out = 0, dl3_out = 0;
  logic intclk, clkin, bc_clk, clkinb4;
  int checks = 0, failures = 0;
  int e_int = 0, e_in = 0, e_bc = 0, e_b4 = 0;

  clock_select dut (.*);

  always #6.2375 xtal80 = !xtal80;      // 80.16 MHz
  always #50 ecl_ext_clk1 = !ecl_ext_clk1;  // 10 MHz external clock
  always #12.5 clock40des1 = !clock40des1;
  always #100 saclk_dly = !saclk_dly;   // 5 MHz stand-in for the delayed SA clock
  always #250 dl3_out = !dl3_out;       // 2 MHz stand-in
  always #500 dl2_out = !dl2_out;       // 1 MHz stand-in

  always @(posedge intclk)  e_int++;
  always @(posedge clkin)   e_in++;
  always @(posedge bc_clk)  e_bc++;
  always @(posedge clkinb4) e_b4++;

  task automatic window(output int n_int, output int n_in, output int n_bc, output int n_b4);
    e_int = 0; e_in = 0; e_bc = 0; e_b4 = 0;
    #10000;
    n_int = e_int; n_in = e_in; n_bc = e_bc; n_b4 = e_b4;
  endtask

  task automatic near(input int got, input int exp, input string what);
    checks++;
    if (got < exp - 2 || got > exp + 2) begin failures++; $display("FAIL: %s: %0d edges, expected %0d", what, got, exp); end
  endtask

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int a, b, c, d;
    #30 rst_n = 1;
    #100;
    window(a, b, c, d);                 // Run mode, no SA clock enabled
    near(a, 401, "internal clock 40.08 MHz"); near(b, 0, "clkin disabled");
    near(c, 400, "bc clock from TTCrx"); near(d, 20, "logic clock via DL3");
    enintclk = 1;
    window(a, b, c, d);
    near(b, 401, "clkin = internal clock");
    enintclk = 0; enextclk = 1;
    window(a, b, c, d);
    near(b, 100, "clkin = external clock");
    samode = 1;
    window(a, b, c, d);
    near(c, 50, "bc clock from SA clock"); near(d, 10, "logic clock bypasses DL3");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
