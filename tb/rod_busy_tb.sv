// rod_busy_tb: self-checking test of rod_busy. The crate busy must be the
// masked OR of the inputs at once (no clock); the status must follow the
// inputs two clocks later; the latched bits must hold every input seen busy
// until cleared.
`timescale 1ns / 1ps
module rod_busy_tb;
  localparam int N = 16;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] busy_in = '0, mask = '1, clr = '0, status, latched;
  logic crate_busy, crate_busy_sync;
  logic [N-1:0] hist [3];
  logic [N-1:0] model_lat;
  int checks = 0, failures = 0;

  rod_busy #(.N_RODS(N)) dut (.*);
  always #5 clk = !clk;

  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    hist[0] = '0; hist[1] = '0; hist[2] = '0; model_lat = '0;
    for (int i = 0; i < 400; i++) begin
      busy_in = N'($urandom) & N'($urandom) & N'($urandom);
      mask = (i % 50 < 25) ? '1 : N'($urandom);
      clr = (i % 37 == 0) ? N'($urandom) : '0;
      #1;
      checks++;
      if (crate_busy !== |(busy_in & mask)) begin failures++; $display("FAIL: crate busy %0d", i); end
      @(posedge clk);
      // model: latched uses status before this edge
      model_lat = (model_lat & ~clr) | hist[1];
      hist[1] = hist[0]; hist[0] = busy_in;
      @(negedge clk);
      checks++;
      if (status !== hist[1]) begin failures++; $display("FAIL: status %0d", i); end
      checks++;
      if (latched !== model_lat) begin failures++; $display("FAIL: latched %0d %h %h", i, latched, model_lat); end
      checks++;
      if (crate_busy_sync !== |(status & mask)) begin failures++; $display("FAIL: sync busy %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
