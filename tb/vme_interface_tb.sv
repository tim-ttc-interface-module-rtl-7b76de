// vme_interface_tb: self-checking test of vme_interface. A VME master in the
// test bench runs D16 write and read cycles with asynchronous timing against
// a small register array on the local bus. Checked: A24 cycles at the base
// set by the geographical address, A32 cycles at a preset base, one local bus
// access per cycle, read data, DTACK released after the strobes, and no
// answer to a wrong base, a wrong address modifier or a single-byte cycle.
`timescale 1ns / 1ps
module vme_interface_tb;
  logic clk = 0, rst_n = 0;
  logic as_n = 1, write_n = 1; logic [1:0] ds_n = 2'b11; logic [5:0] am = '0;
  logic [31:1] a = '0; logic [15:0] d_in = '0, d_out; logic d_oe, dtack_n, irq_n;
  logic [4:0] ga = 5'd7; logic a32_mode = 0, use_ga = 1; logic [15:0] base_preset = 16'h4321;
  logic [7:0] lb_addr; logic lb_wr, lb_rd; logic [15:0] lb_wdata, lb_rdata; logic irq_req = 0;
  logic [15:0] regs [128];
  int checks = 0, failures = 0, n_acc = 0;

  vme_interface dut (.*);
  always #12.5 clk = !clk;

  assign lb_rdata = regs[lb_addr[7:1]];
  always @(posedge clk) begin
    if (lb_wr) regs[lb_addr[7:1]] <= lb_wdata;
    if (lb_wr || lb_rd) n_acc++;
  end

  // one VME cycle; returns 1 if acknowledged
  task automatic cycle(input logic [5:0] m, input logic [31:0] addr, input bit write,
                       input logic [15:0] wd, input logic [1:0] ds, output logic [15:0] rd, output bit acked);
    int t = 0;
    am = m; a = addr[31:1]; write_n = !write; d_in = wd;
    #7 as_n = 0;
    #5 ds_n = ds;
    acked = 0;
    while (t < 40) begin
      #5; t++;
      if (!dtack_n) begin acked = 1; break; end
    end
    rd = d_out;
    if (acked && !write) begin checks++; if (!d_oe) begin failures++; $display("FAIL: d_oe"); end end
    #3 ds_n = 2'b11; as_n = 1;
    t = 0;
    while (!dtack_n && t < 40) begin #5; t++; end
    checks++;
    if (!dtack_n || d_oe) begin failures++; $display("FAIL: dtack not released"); end
    #20;
  endtask

  initial begin
    #300000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [15:0] r; bit ack; int n0;
    foreach (regs[i]) regs[i] = '0;
    #60 rst_n = 1;
    #60;
    // A24, base from GA = 7 -> A23..A19 = 00111, base A23..A16 = 0x38
    cycle(6'h39, 32'h0038_0010, 1, 16'hCAFE, 2'b00, r, ack);
    checks++; if (!ack || regs[8] !== 16'hCAFE) begin failures++; $display("FAIL: A24 write"); end
    cycle(6'h3D, 32'h0038_0010, 0, 0, 2'b00, r, ack);
    checks++; if (!ack || r !== 16'hCAFE) begin failures++; $display("FAIL: A24 read %h", r); end
    n0 = n_acc;
    cycle(6'h39, 32'h0039_0010, 1, 16'h1111, 2'b00, r, ack);   // wrong base
    checks++; if (ack) begin failures++; $display("FAIL: answered wrong base"); end
    cycle(6'h39, 32'h00B8_0010, 1, 16'h1111, 2'b00, r, ack);   // base differs in A23
    checks++; if (ack) begin failures++; $display("FAIL: answered with A23 set"); end
    cycle(6'h09, 32'h0038_0010, 1, 16'h1111, 2'b00, r, ack);   // A32 code in A24 mode
    checks++; if (ack) begin failures++; $display("FAIL: answered wrong AM"); end
    cycle(6'h39, 32'h0038_0010, 1, 16'h1111, 2'b10, r, ack);   // single byte
    checks++; if (ack) begin failures++; $display("FAIL: answered byte cycle"); end
    checks++; if (n_acc != n0 || regs[8] !== 16'hCAFE) begin failures++; $display("FAIL: local access on a cycle not answered"); end
    // A32, preset base 0x4321
    a32_mode = 1; use_ga = 0;
    for (int i = 0; i < 10; i++) begin
      n0 = n_acc;
      cycle(6'h09, {16'h4321, 8'h00, 8'(i * 2)}, 1, 16'(i * 1000 + 7), 2'b00, r, ack);
      checks++; if (!ack || n_acc != n0 + 1) begin failures++; $display("FAIL: A32 write %0d", i); end
    end
    for (int i = 0; i < 10; i++) begin
      cycle(6'h0D, {16'h4321, 8'h00, 8'(i * 2)}, 0, 0, 2'b00, r, ack);
      checks++; if (!ack || r !== 16'(i * 1000 + 7)) begin failures++; $display("FAIL: A32 read %0d", i); end
    end
    cycle(6'h09, 32'h4321_0100, 1, 16'h1, 2'b00, r, ack);   // outside register space
    checks++; if (ack) begin failures++; $display("FAIL: answered outside the registers"); end
    irq_req = 1; #1;
    checks++; if (irq_n) begin failures++; $display("FAIL: irq"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
