// seq_sink_tb: self-checking test of seq_sink with two tim_ram instances
// (64 words, so that the sink can be filled). The processor side writes a
// sequence; playback must give each word in turn, one word per cycle, with
// zero before and after; looping must restart at 0; stop must end at once.
// The sink records a counting pattern until full; the recorded words are read
// back through the processor address and compared.
`timescale 1ns / 1ps
module seq_sink_tb;
  localparam int D = 64, AW = 6;
  logic clk = 0, rst_n = 0;
  logic seq_start = 0, seq_stop = 0, seq_loop = 0, seq_running, seq_vwe = 0;
  logic [AW-1:0] seq_end = '0, seq_vaddr = '0, seq_ram_addr, sink_vaddr = '0, sink_ram_addr;
  logic [7:0] seq_word, seq_vwdata = '0, seq_ram_din, seq_ram_rdata, sink_word = '0, sink_ram_din, sink_ram_rdata;
  logic seq_ram_we, sink_en = 0, sink_full, sink_ram_we;
  logic [AW:0] sink_count;
  logic [7:0] pattern [D];
  int checks = 0, failures = 0;

  seq_sink #(.DEPTH(D)) dut (.*);
  tim_ram #(.WIDTH(8), .DEPTH(D)) u_seq (.clk, .addr(seq_ram_addr), .we(seq_ram_we), .din(seq_ram_din), .rdata(seq_ram_rdata));
  tim_ram #(.WIDTH(8), .DEPTH(D)) u_sink (.clk, .addr(sink_ram_addr), .we(sink_ram_we), .din(sink_ram_din), .rdata(sink_ram_rdata));
  always #5 clk = !clk;

  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < D; i++) begin
      pattern[i] = 8'($urandom | 1);   // never zero, so playback is visible
      seq_vaddr = AW'(i); seq_vwdata = pattern[i]; seq_vwe = 1; @(negedge clk);
    end
    seq_vwe = 0;
    // play 0..9
    seq_end = AW'(9);
    chk(seq_word == 0, "idle word is zero");
    seq_start = 1; @(negedge clk); seq_start = 0;
    chk(seq_running, "running after start");
    for (int i = 0; i < 10; i++) begin
      @(negedge clk);
      chk(seq_word == pattern[i], $sformatf("play word %0d", i));
    end
    @(negedge clk);
    chk(seq_word == 0 && !seq_running, "stopped after last word");
    // write during playback is ignored, loop mode
    seq_loop = 1;
    seq_start = 1; @(negedge clk); seq_start = 0;
    seq_vaddr = 0; seq_vwdata = 8'h00; seq_vwe = 1;
    for (int i = 0; i < 25; i++) begin
      @(negedge clk); seq_vwe = 0;
      chk(seq_word == pattern[i % 10], $sformatf("loop word %0d", i));
    end
    seq_stop = 1; @(negedge clk); seq_stop = 0;
    @(negedge clk);
    chk(!seq_running && seq_word == 0, "stop");
    seq_loop = 0;
    // sink
    sink_en = 1;
    for (int i = 0; i < D + 10; i++) begin
      sink_word = 8'(i * 3 + 1); @(negedge clk);
    end
    chk(sink_full && sink_count == D, "sink full");
    sink_en = 0; @(negedge clk);
    // recording starts the cycle after sink_en rises, at word index 1
    for (int i = 0; i < D; i++) begin
      sink_vaddr = AW'(i); @(negedge clk); @(negedge clk);
      chk(sink_ram_rdata == 8'((i + 1) * 3 + 1), $sformatf("sink word %0d = %h", i, sink_ram_rdata));
    end
    // re-arm clears the count
    sink_en = 1; @(negedge clk); @(negedge clk); @(negedge clk);
    chk(sink_count == 2, "re-armed count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
