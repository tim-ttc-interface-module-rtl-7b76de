// prog_delay_line_tb: self-checking test of the prog_delay_line model. For
// several settings it measures the time from each input edge to the output
// edge (base 500 ps + 250 ps per step), and checks that edges closer together
// than the delay all come through.
`timescale 1ns / 1ps
module prog_delay_line_tb;
  logic din = 0, dout;
  logic [5:0] sel = '0;
  int checks = 0, failures = 0;
  realtime t_in, t_out;

  prog_delay_line #(.SEL_W(6), .BASE_PS(500), .STEP_PS(250)) dut (.*);

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int n;
    int settings[5] = '{0, 1, 7, 20, 63};
    #10;
    for (int k = 0; k < 5; k++) begin
      int s;
      s = settings[k];
      sel = 6'(s);
      #50;
      for (int e = 0; e < 2; e++) begin
        t_in = $realtime; din = !din;
        @(dout);
        t_out = $realtime;
        checks++;
        if (t_out - t_in < (0.5 + 0.25 * s) - 0.002 || t_out - t_in > (0.5 + 0.25 * s) + 0.002) begin
          failures++; $display("FAIL: sel %0d delay %0t", s, t_out - t_in);
        end
        #40;
      end
    end
    // a 2 ns pulse train through a 16.25 ns delay: every edge is kept
    sel = 6'd63; #50;
    n = 0;
    fork
      repeat (8) begin #2 din = !din; end
      repeat (8) begin @(dout); n++; end
    join
    checks++;
    if (n != 8) begin failures++; $display("FAIL: edges lost"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
