// ttc_output_reg_tb: self-checking test of ttc_output_reg: both banks show
// the input of the previous clock edge, and reset clears them.
`timescale 1ns / 1ps
module ttc_output_reg_tb;
  logic ttc_clk = 0, rst_n = 0;
  logic [7:0] d = '0, ttc_a, ttc_b, prev;
  int checks = 0, failures = 0;

  ttc_output_reg dut (.*);
  always #12.5 ttc_clk = !ttc_clk;

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    d = 8'hFF;
    @(negedge ttc_clk);
    checks++; if (ttc_a !== 0 || ttc_b !== 0) failures++;
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      d = 8'($urandom); prev = d;
      @(posedge ttc_clk); #1;
      d = 8'($urandom);   // changes after the edge must not show
      #1;
      checks++;
      if (ttc_a !== prev || ttc_b !== prev) begin failures++; $display("FAIL: step %0d", i); end
      @(negedge ttc_clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
