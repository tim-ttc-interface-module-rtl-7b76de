// tim_fifo_tb: self-checking test of tim_fifo. Random writes and reads are
// compared with a queue reference model; the FIFO is then filled to see full,
// the dropped write and the overflow flag, and drained in order.
`timescale 1ns / 1ps
module tim_fifo_tb;
  localparam int W = 12, D = 8;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0, clr_ovf = 0;
  logic [W-1:0] din = '0, dout;
  logic empty, full, overflow;
  logic [$clog2(D):0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];

  tim_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(empty && !full && count == 0, "empty after reset");
    // random traffic
    for (int i = 0; i < 400; i++) begin
      wr_en = ($urandom % 2) != 0 && model.size() < D;
      rd_en = ($urandom % 2) != 0 && !empty;
      din   = W'($urandom);
      if (rd_en) begin
        check(dout == model[0], $sformatf("data %h expected %h", dout, model[0]));
      end
      @(posedge clk);
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(din);
      @(negedge clk);
      check(count == model.size(), "count");
      check(empty == (model.size() == 0), "empty flag");
    end
    wr_en = 0; rd_en = 0;
    // drain
    while (!empty) begin
      check(dout == model.pop_front(), "drain data");
      rd_en = 1; @(negedge clk); rd_en = 0;
    end
    // fill to full, one extra write
    for (int i = 0; i <= D; i++) begin
      wr_en = 1; din = W'(i + 100); @(negedge clk);
    end
    wr_en = 0;
    check(full && count == D, "full");
    check(overflow, "overflow set by write when full");
    for (int i = 0; i < D; i++) begin
      check(dout == W'(i + 100), "order after overflow");
      rd_en = 1; @(negedge clk);
    end
    rd_en = 0;
    check(empty, "empty after drain");
    clr_ovf = 1; @(negedge clk); clr_ovf = 0;
    check(!overflow, "overflow cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
