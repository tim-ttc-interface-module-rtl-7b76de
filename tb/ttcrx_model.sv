// ttcrx_model: behavioural model of the outputs of a TTCrx receiver chip, for
// the testbenches. It makes the 40.08 MHz BC clock (CLOCK40DES1) and, on
// request through its tasks, the fast command outputs and the event ID:
//   l1a(tt)   - one-cycle L1accept; the bunch number of that cycle and the
//               event number go out on cnt_bus three or more cycles later
//               (bcnt_str, evcnt_lstr, evcnt_hstr in consecutive cycles),
//               then the trigger type tt on dout with dout_str;
//   bcr(), ecr() - bunch / event counter reset pulses; the bunch counter is
//               0 in the cycle after a BCR; the first event after an ECR is 0;
//   brcst_cmd(b) - broadcast bits b on brcst[7:2] with brcst_str.
// Event IDs wait in a queue, so L1As may come in every cycle.
// Every output changes on the falling clock edge.
`timescale 1ns / 1ps
module ttcrx_model (
  output logic        clock40des1,
  output logic        l1accept,
  output logic        bcnt_res,
  output logic        evcnt_res,
  output logic [7:2]  brcst,
  output logic        brcst_str,
  output logic [11:0] cnt_bus,
  output logic        bcnt_str,
  output logic        evcnt_lstr,
  output logic        evcnt_hstr,
  output logic [7:0]  dout,
  output logic        dout_str
);
  typedef struct { int unsigned bc; int unsigned ev; logic [7:0] tt; int due; } ev_t;
  ev_t q[$];
  logic clk = 0;
  int cyc = 0;
  int unsigned bcnt = 0, evcnt = 0;
  int phase = 0;

  always #12.475 clk = !clk;
  assign clock40des1 = clk;

  initial begin
    l1accept = 0; bcnt_res = 0; evcnt_res = 0; brcst = '0; brcst_str = 0;
    cnt_bus = '0; bcnt_str = 0; evcnt_lstr = 0; evcnt_hstr = 0; dout = '0; dout_str = 0;
  end

  always @(posedge clk) begin
    cyc  <= cyc + 1;
    bcnt <= bcnt_res ? 0 : (bcnt + 1) % 4096;
  end

  task automatic l1a(input logic [7:0] tt);
    ev_t e;
    @(negedge clk);
    e.bc = bcnt; e.ev = evcnt; e.tt = tt; e.due = cyc + 3;
    q.push_back(e);
    evcnt = (evcnt + 1) % (1 << 24);
    l1accept = 1;
    @(negedge clk);
    l1accept = 0;
  endtask

  task automatic bcr();
    @(negedge clk); bcnt_res = 1; @(negedge clk); bcnt_res = 0;
  endtask

  task automatic ecr();
    @(negedge clk); evcnt = 0; evcnt_res = 1; @(negedge clk); evcnt_res = 0;
  endtask

  task automatic brcst_cmd(input logic [7:2] b);
    @(negedge clk); brcst = b; brcst_str = 1; @(negedge clk); brcst_str = 0; brcst = '0;
  endtask

  // event ID output sequencer
  always @(negedge clk) begin
    bcnt_str <= 0; evcnt_lstr <= 0; evcnt_hstr <= 0; dout_str <= 0;
    if (q.size() != 0 && cyc >= q[0].due) begin
      case (phase)
        0: begin cnt_bus <= 12'(q[0].bc);        bcnt_str   <= 1; end
        1: begin cnt_bus <= 12'(q[0].ev);        evcnt_lstr <= 1; end
        2: begin cnt_bus <= 12'(q[0].ev >> 12);  evcnt_hstr <= 1; end
        3: begin dout    <= q[0].tt;             dout_str   <= 1; end
        default: ;
      endcase
      if (phase == 3) begin phase <= 0; void'(q.pop_front()); end
      else phase <= phase + 1;
    end
  end
endmodule
