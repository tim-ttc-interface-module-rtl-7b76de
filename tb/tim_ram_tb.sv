// tim_ram_tb: self-checking test of tim_ram at its full 32k x 8 size. Writes
// a pattern computed from the address to every word, reads all back, and
// checks the one-cycle read latency.
`timescale 1ns / 1ps
module tim_ram_tb;
  localparam int D = 32768;
  logic clk = 0;
  logic [14:0] addr = '0;
  logic we = 0;
  logic [7:0] din = '0, rdata;
  int checks = 0, failures = 0;

  tim_ram #(.WIDTH(8), .DEPTH(D)) dut (.*);

  always #5 clk = !clk;

  function automatic logic [7:0] pat(int a);
    return 8'((a * 37) ^ (a >> 7));
  endfunction

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int a = 0; a < D; a++) begin
      addr = 15'(a); din = pat(a); we = 1; @(negedge clk);
    end
    we = 0;
    for (int a = 0; a < D; a++) begin
      addr = 15'(a); @(negedge clk);
      checks++;
      if (rdata !== pat(a)) begin
        failures++;
        if (failures < 10) $display("FAIL: addr %0d got %h expected %h", a, rdata, pat(a));
      end
    end
    // latency: the word of the new address appears only after the edge
    addr = 15'd5; @(negedge clk);
    addr = 15'd6; #1;
    checks++; if (rdata !== pat(5)) failures++;
    @(negedge clk);
    checks++; if (rdata !== pat(6)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
