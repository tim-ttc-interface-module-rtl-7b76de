// sa_gen_b_tb: self-checking test of sa_gen_b. Oscillator pulses become
// triggers one cycle later and are counted; the run stops after trig_num
// triggers (done); pulses during inhibit are skipped and not counted;
// trig_num = 0 runs without limit; dropping en clears the count.
`timescale 1ns / 1ps
module sa_gen_b_tb;
  logic clk = 0, rst_n = 0, en = 0, osc = 0, inhibit = 0, auto_trig, done;
  logic [15:0] trig_num = '0, trig_cnt;
  int checks = 0, failures = 0;
  int ntrig = 0;

  sa_gen_b #(.CNT_W(16)) dut (.*);
  always #5 clk = !clk;
  always @(posedge clk) if (auto_trig) ntrig++;

  task automatic pulses(input int n);
    repeat (n) begin
      @(negedge clk); osc = 1;
      @(negedge clk); osc = 0;
      checks++;
      if (en && !auto_trig && !done && !inhibit) begin failures++; $display("FAIL: no trigger one cycle after pulse"); end
      @(negedge clk);
    end
  endtask

  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    pulses(3);
    checks++; if (ntrig != 0) begin failures++; $display("FAIL: triggers while disabled"); end
    en = 1; trig_num = 16'd5;
    pulses(8);
    checks++; if (ntrig != 5 || trig_cnt != 5 || !done) begin failures++; $display("FAIL: limit %0d", ntrig); end
    en = 0; @(negedge clk);
    checks++; if (trig_cnt != 0) begin failures++; $display("FAIL: count not cleared"); end
    ntrig = 0; en = 1; trig_num = 0;
    pulses(4);
    inhibit = 1; pulses(3); inhibit = 0;
    pulses(2);
    checks++; if (ntrig != 6 || trig_cnt != 6 || done) begin failures++; $display("FAIL: unlimited/inhibit %0d", ntrig); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
