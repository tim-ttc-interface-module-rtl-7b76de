// ttc_interface_tb: self-checking test of ttc_interface driven by the TTCrx
// model. Every fast command must appear on cmd exactly one clock after the
// TTCrx gives it; every L1A must give one event ID with the bunch number,
// event number and trigger type that the test bench predicts from its own
// count of BCRs, ECRs and clocks. One event is then driven by hand with the
// trigger type ahead of the event number, the other order.
`timescale 1ns / 1ps
module ttc_interface_tb;
  import tim_pkg::*;
  logic clk, rst_n = 0;
  logic l1accept, bcnt_res, evcnt_res, brcst_str, bcnt_str, evcnt_lstr, evcnt_hstr, dout_str;
  logic [7:2] brcst; logic [11:0] cnt_bus; logic [7:0] dout;
  // hand-driven copies for the second part
  logic hand = 0;
  logic h_lstr = 0, h_hstr = 0, h_dstr = 0, h_bstr = 0; logic [11:0] h_bus = '0; logic [7:0] h_dout = '0;
  fast_cmd_t cmd;
  logic id_valid;
  logic [L1ID_W-1:0] l1id; logic [BCID_W-1:0] bcid; logic [TTID_W-1:0] ttid;
  int checks = 0, failures = 0;
  logic [35:0] exp_ev[$];
  logic [7:0]  exp_tt[$];
  int n_ids = 0;

  ttcrx_model u_ttcrx (.clock40des1(clk), .l1accept, .bcnt_res, .evcnt_res, .brcst, .brcst_str,
    .cnt_bus, .bcnt_str, .evcnt_lstr, .evcnt_hstr, .dout, .dout_str);

  ttc_interface dut (.clk, .rst_n, .l1accept, .bcnt_res, .evcnt_res, .brcst, .brcst_str,
    .cnt_bus(hand ? h_bus : cnt_bus), .bcnt_str(hand ? h_bstr : bcnt_str),
    .evcnt_lstr(hand ? h_lstr : evcnt_lstr), .evcnt_hstr(hand ? h_hstr : evcnt_hstr),
    .dout(hand ? h_dout : dout), .dout_str(hand ? h_dstr : dout_str),
    .cmd, .id_valid, .l1id, .bcid, .ttid);

  // fast command latency: cmd now = TTCrx outputs one edge ago
  fast_cmd_t prev_in;
  always @(posedge clk) begin
    if (rst_n) begin
      #1;
      checks++;
      if (cmd !== prev_in) begin failures++; $display("FAIL: cmd %b expected %b", cmd, prev_in); end
      if (id_valid) begin
        n_ids++;
        checks++;
        if ({l1id, bcid} !== exp_ev[0] || ttid !== {2'b00, exp_tt[0]}) begin
          failures++; $display("FAIL: id %h/%h/%h expected %h/%h", l1id, bcid, ttid, exp_ev[0], exp_tt[0]);
        end
        void'(exp_ev.pop_front()); void'(exp_tt.pop_front());
      end
    end
  end
  always @(negedge clk) begin
    #1;
    prev_in = '{spare: brcst_str & brcst[4], fer: brcst_str & brcst[3], cal: brcst_str & brcst[2],
                bcr: bcnt_res, ecr: evcnt_res, l1a: l1accept};
  end

  // independent bunch counter, sampled like the TTCrx model defines it
  int unsigned bc_model = 0, ev_model = 0;
  always @(posedge clk) bc_model <= bcnt_res ? 0 : (bc_model + 1) % 4096;

  task automatic trig(input logic [7:0] tt);
    @(negedge clk);
    #2;
    exp_ev.push_back({24'(ev_model), 12'((bc_model + 1) % 4096)});  // L1A goes out one clock later
    exp_tt.push_back(tt);
    ev_model++;
    u_ttcrx.l1a(tt);
  endtask

  initial begin
    #400000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    u_ttcrx.bcr();
    for (int i = 0; i < 40; i++) begin
      case ($urandom % 6)
        0: begin u_ttcrx.bcr(); end
        1: begin u_ttcrx.ecr(); ev_model = 0; end
        2: u_ttcrx.brcst_cmd(6'($urandom));
        default: trig(8'($urandom));
      endcase
      repeat ($urandom % 4) @(negedge clk);
    end
    repeat (200) @(negedge clk);
    checks++;
    if (n_ids == 0 || exp_ev.size() != 0) begin failures++; $display("FAIL: %0d ids, %0d left", n_ids, exp_ev.size()); end
    // trigger type before the event number
    hand = 1;
    @(negedge clk); h_dout = 8'hC3; h_dstr = 1;
    @(negedge clk); h_dstr = 0; h_bus = 12'h123; h_bstr = 1;
    @(negedge clk); h_bstr = 0; h_bus = 12'h456; h_lstr = 1;
    @(negedge clk); h_lstr = 0; h_bus = 12'h789; h_hstr = 1;
    exp_ev.push_back({24'h789456, 12'h123}); exp_tt.push_back(8'hC3);
    @(negedge clk); h_hstr = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (exp_ev.size() != 0) begin failures++; $display("FAIL: reversed order event missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
