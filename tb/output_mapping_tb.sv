// output_mapping_tb: self-checking test of output_mapping. For random inputs
// the bus is predicted bit by bit from the line assignment (L1A 0, ECR 1,
// BCR 2, CAL 3, Serial ID 4, Serial TT 5, FER 6, spare 7) for each source:
// Run mode takes the TTC commands, SA mode the stand-alone ones, and the
// sequencer word replaces the whole bus. FER follows ECR when enabled.
`timescale 1ns / 1ps
module output_mapping_tb;
  import tim_pkg::*;
  bus_src_t src;
  logic fer_from_ecr, serial_id, serial_tt;
  fast_cmd_t ttc_cmd, sa_cmd, c;
  logic [7:0] seq_word, ttc_bus, exp_bus;
  int checks = 0, failures = 0;

  output_mapping dut (.*);

  initial begin
    for (int i = 0; i < 2000; i++) begin
      src = bus_src_t'($urandom % 3);
      fer_from_ecr = 1'($urandom);
      ttc_cmd = fast_cmd_t'($urandom); sa_cmd = fast_cmd_t'($urandom);
      serial_id = 1'($urandom); serial_tt = 1'($urandom);
      seq_word = 8'($urandom);
      #1;
      c = (src == SRC_RUN) ? ttc_cmd : sa_cmd;
      exp_bus = {c.spare, c.fer | (fer_from_ecr & c.ecr), serial_tt, serial_id,
                 c.cal, c.bcr, c.ecr, c.l1a};
      if (src == SRC_SEQ) exp_bus = seq_word;
      checks++;
      if (ttc_bus !== exp_bus) begin
        failures++;
        if (failures < 10) $display("FAIL: src %0d bus %b expected %b", src, ttc_bus, exp_bus);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
