// sa_gen_a_tb: self-checking test of sa_gen_a. Each source is exercised on
// its own and the cycle in which the command appears is measured:
// VME and automatic pulses one cycle later, external NIM/ECL edges three
// clock edges later (plus the programmed delay for triggers), the trigger
// switch like an external trigger. Masked inputs, disabled external inputs and
// triggers during inhibit must give nothing (the last reported on vetoed).
`timescale 1ns / 1ps
module sa_gen_a_tb;
  import tim_pkg::*;
  logic clk = 0, rst_n = 0;
  fast_cmd_t vme_cmd = NO_CMD, sa_cmd;
  logic [5:0] ext_nim = '0, ext_ecl = '0, ext_mask = '1;
  logic ext_en = 1, trigger_sw = 0, auto_trig = 0, auto_ecr = 0, inhibit = 0, vetoed;
  logic [7:0] trig_delay = '0;
  int checks = 0, failures = 0;
  int cyc = 0;

  sa_gen_a #(.TRIG_DLY_MAX(256)) dut (.*);
  always #5 clk = !clk;
  always @(posedge clk) cyc <= cyc + 1;

  // Wait up to maxw edges for sa_cmd == want; return the number of edges.
  task automatic expect_cmd(input fast_cmd_t want, input int lat, input string what);
    int n = 0;
    while (n < lat + 20) begin
      @(posedge clk); #1; n++;
      if (sa_cmd != NO_CMD) break;
    end
    checks++;
    if (sa_cmd !== want || n != lat) begin
      failures++; $display("FAIL: %s: got %b after %0d edges, expected %b after %0d", what, sa_cmd, n, want, lat);
    end
    @(posedge clk); #1;
    checks++;
    if (sa_cmd !== NO_CMD) begin failures++; $display("FAIL: %s: pulse longer than one cycle", what); end
  endtask

  task automatic expect_none(input int cycles, input string what);
    int seen = 0;
    repeat (cycles) begin @(posedge clk); #1; if (sa_cmd != NO_CMD) seen++; end
    checks++;
    if (seen != 0) begin failures++; $display("FAIL: %s: unexpected command", what); end
  endtask

  initial begin
    #400000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    repeat (4) @(negedge clk);
    // VME one-shot commands
    for (int b = 0; b < 6; b++) begin
      @(negedge clk); vme_cmd = fast_cmd_t'(6'(1 << b));
      fork
        expect_cmd(fast_cmd_t'(6'(1 << b)), 1, $sformatf("vme bit %0d", b));
        begin @(negedge clk); vme_cmd = NO_CMD; end
      join
    end
    // external NIM and ECL: rising edge of a level
    for (int b = 0; b < 6; b++) begin
      @(negedge clk); if (b % 2 == 0) ext_nim[b] = 1; else ext_ecl[b] = 1;
      expect_cmd(fast_cmd_t'(6'(1 << b)), 3, $sformatf("ext bit %0d", b));
      ext_nim = '0; ext_ecl = '0;
      expect_none(5, "falling edge");
    end
    // external trigger with delay 10
    trig_delay = 8'd10;
    @(negedge clk); ext_nim[0] = 1;
    expect_cmd(fast_cmd_t'(6'b000001), 13, "delayed ext trigger");
    ext_nim = '0;
    // trigger switch, same delay
    @(negedge clk); trigger_sw = 1;
    expect_cmd(fast_cmd_t'(6'b000001), 13, "trigger switch");
    trigger_sw = 0;
    trig_delay = '0;
    expect_none(20, "idle");
    // mask and enable
    ext_mask = 6'b111110;
    @(negedge clk); ext_nim[0] = 1;
    expect_none(20, "masked trigger");
    ext_nim = '0; ext_mask = '1; ext_en = 0;
    @(negedge clk); ext_ecl[2] = 1;
    expect_none(20, "external disabled");
    ext_ecl = '0; ext_en = 1;
    // automatic trigger and ECR
    @(negedge clk); auto_trig = 1;
    fork expect_cmd(fast_cmd_t'(6'b000001), 1, "auto trigger"); begin @(negedge clk); auto_trig = 0; end join
    @(negedge clk); auto_ecr = 1;
    fork expect_cmd(fast_cmd_t'(6'b000010), 1, "auto ecr"); begin @(negedge clk); auto_ecr = 0; end join
    // inhibit
    inhibit = 1;
    @(negedge clk); auto_trig = 1;
    @(posedge clk); #1;
    checks++;
    if (sa_cmd.l1a || !vetoed) begin failures++; $display("FAIL: inhibit"); end
    @(negedge clk); auto_trig = 0; inhibit = 0;
    expect_none(10, "after inhibit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
