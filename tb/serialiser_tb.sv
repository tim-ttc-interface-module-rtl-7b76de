// serialiser_tb: self-checking test of serialiser, fed by two tim_fifo
// instances as the ID and TT FIFOs. A receiver in the
// test bench decodes both serial lines (start bit, then MSB first) and
// compares every frame with the words queued; the distance between frames
// with a full queue must be 38 cycles (start bit + 36 bits + one idle cycle).
`timescale 1ns / 1ps
module serialiser_tb;
  import tim_pkg::*;
  logic clk = 0, rst_n = 0;
  logic id_empty, tt_empty, id_rd, tt_rd, serial_id, serial_tt, busy;
  logic [EVID_W-1:0] id_data;
  logic [TTID_W-1:0] tt_data;
  logic [EVID_W-1:0] id_exp[$], id_din;
  logic [TTID_W-1:0] tt_exp[$], tt_din;
  logic wr = 0;
  logic id_full, tt_full, id_ovf, tt_ovf;
  logic [4:0] id_cnt, tt_cnt;
  int checks = 0, failures = 0;
  int frames = 0, last_start = -1, cyc = 0;

  serialiser dut (.*);
  always #5 clk = !clk;

  tim_fifo #(.WIDTH(EVID_W), .DEPTH(16)) u_idf (.clk, .rst_n, .wr_en(wr), .din(id_din),
    .rd_en(id_rd), .dout(id_data), .empty(id_empty), .full(id_full), .overflow(id_ovf),
    .clr_ovf(1'b0), .count(id_cnt));
  tim_fifo #(.WIDTH(TTID_W), .DEPTH(16)) u_ttf (.clk, .rst_n, .wr_en(wr), .din(tt_din),
    .rd_en(tt_rd), .dout(tt_data), .empty(tt_empty), .full(tt_full), .overflow(tt_ovf),
    .clr_ovf(1'b0), .count(tt_cnt));

  always @(posedge clk) cyc <= cyc + 1;

  // receiver
  initial begin
    logic [EVID_W-1:0] rid; logic [TTID_W-1:0] rtt;
    forever begin
      @(negedge clk);
      if (serial_id) begin
        checks++;
        if (!serial_tt) begin failures++; $display("FAIL: TT start bit missing"); end
        if (frames >= 2 && frames <= 10) begin
          checks++;
          if (cyc - last_start != 38) begin failures++; $display("FAIL: frame spacing %0d", cyc - last_start); end
        end
        last_start = cyc;
        rid = '0; rtt = '0;
        for (int b = 0; b < EVID_W; b++) begin
          @(negedge clk);
          rid = {rid[EVID_W-2:0], serial_id};
          if (b < TTID_W) rtt = {rtt[TTID_W-2:0], serial_tt};
          else if (serial_tt) begin failures++; $display("FAIL: TT line not idle after frame"); end
        end
        checks++;
        if (rid !== id_exp[0] || rtt !== tt_exp[0]) begin
          failures++; $display("FAIL: frame %0d got %h/%h expected %h/%h", frames, rid, rtt, id_exp[0], tt_exp[0]);
        end
        void'(id_exp.pop_front()); void'(tt_exp.pop_front());
        frames++;
      end
    end
  end

  initial begin
    #500000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic push();
    logic [EVID_W-1:0] i = EVID_W'({$urandom, $urandom});
    logic [TTID_W-1:0] t = TTID_W'($urandom);
    id_din = i; tt_din = t; wr = 1;
    id_exp.push_back(i); tt_exp.push_back(t);
    @(negedge clk); wr = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    // latency: first bit one cycle after the word is available
    @(negedge clk); push();
    @(negedge clk);   // written at the edge before the last one, started at it
    checks++;
    if (!serial_id) begin failures++; $display("FAIL: start bit latency"); end
    // a burst of 10 events queued together
    repeat (60) @(negedge clk);
    repeat (10) push();   // one per cycle
    // sparse events
    repeat (500) @(negedge clk);
    for (int k = 0; k < 5; k++) begin push(); repeat (70) @(negedge clk); end
    repeat (100) @(negedge clk);
    checks++;
    if (frames != 16 || busy) begin failures++; $display("FAIL: %0d frames", frames); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
