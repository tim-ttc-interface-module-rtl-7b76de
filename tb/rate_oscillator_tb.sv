// rate_oscillator_tb: self-checking test of rate_oscillator. Measures the
// distance between pulses for several periods, and checks that period 0 and
// en low give no pulses.
`timescale 1ns / 1ps
module rate_oscillator_tb;
  logic clk = 0, rst_n = 0, en = 0, pulse;
  logic [15:0] period = '0;
  int checks = 0, failures = 0;

  rate_oscillator #(.WIDTH(16)) dut (.*);

  always #5 clk = !clk;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input int p);
    int last, n, cyc;
    period = 16'(p); en = 1;
    last = -1; n = 0; cyc = 0;
    while (n < 6) begin
      @(posedge clk); #1; cyc++;
      if (pulse) begin
        if (last >= 0) begin
          checks++;
          if (cyc - last != p) begin
            failures++;
            $display("FAIL: period %0d spacing %0d", p, cyc - last);
          end
        end
        last = cyc; n++;
      end
      if (cyc > 20 * p + 50) begin
        failures++; $display("FAIL: no pulses for period %0d", p); break;
      end
    end
    en = 0;
    repeat (3) @(posedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    measure(1);
    measure(2);
    measure(7);
    measure(100);
    // en low or period 0: silent
    begin
      int seen = 0;
      period = 16'd3; en = 0;
      repeat (50) begin @(posedge clk); #1; if (pulse) seen++; end
      en = 1; period = 0;
      repeat (50) begin @(posedge clk); #1; if (pulse) seen++; end
      checks++;
      if (seen != 0) begin failures++; $display("FAIL: pulses while stopped"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
