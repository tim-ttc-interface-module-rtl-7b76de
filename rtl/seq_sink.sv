// seq_sink: TTC sequencer and sink controller of the TIM (the PLD7 CPLD).
//
// The sequencer plays a long sequence of TTC bus words, written beforehand by
// the local processor into the 32k x 8 sequencer RAM, onto the TTC bus: one
// 8-bit word per BC clock, so it can hold any pattern of fast commands and
// serial event ID bits. The sink is a second RAM of the same size that records
// the words sent to the RODs, for checking off-line. Both RAMs, their size and
// their purpose follow the document; the control below is this design's own.
//
// Sequencer: a seq_start pulse plays addresses 0 .. seq_end, one per cycle;
// seq_word shows each word one cycle after its address (RAM read latency) and
// is zero when the sequencer is not playing. At the end it stops, or starts
// again at 0 when seq_loop is set; seq_stop stops it at once. While it is idle
// the RAM is addressed by the local processor (seq_vaddr, seq_vwe, seq_vwdata);
// writes during playback are ignored.
// Sink: while sink_en is high it writes sink_word into the sink RAM every
// cycle from address 0 upwards, until the RAM is full (sink_full); a rising
// edge of sink_en restarts it at 0. sink_count tells how many words it holds.
// When not recording, the sink RAM is addressed by sink_vaddr for reading.
`timescale 1ns / 1ps
module seq_sink #(
  parameter int unsigned DEPTH = 32768,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // sequencer control
  input  logic          seq_start,
  input  logic          seq_stop,
  input  logic          seq_loop,
  input  logic [AW-1:0] seq_end,
  output logic          seq_running,
  output logic [7:0]    seq_word,
  // processor access to the sequencer RAM
  input  logic [AW-1:0] seq_vaddr,
  input  logic          seq_vwe,
  input  logic [7:0]    seq_vwdata,
  // sequencer RAM port
  output logic [AW-1:0] seq_ram_addr,
  output logic          seq_ram_we,
  output logic [7:0]    seq_ram_din,
  input  logic [7:0]    seq_ram_rdata,
  // sink
  input  logic          sink_en,
  input  logic [7:0]    sink_word,
  input  logic [AW-1:0] sink_vaddr,
  output logic [AW:0]   sink_count,
  output logic          sink_full,
  output logic [AW-1:0] sink_ram_addr,
  output logic          sink_ram_we,
  output logic [7:0]    sink_ram_din
);
  logic [AW-1:0] seq_ptr;
  logic          word_valid;
  logic          sink_en_q;
  logic          recording;

  assign seq_ram_addr = seq_running ? seq_ptr : seq_vaddr;
  assign seq_ram_we   = !seq_running && seq_vwe;
  assign seq_ram_din  = seq_vwdata;
  assign seq_word     = word_valid ? seq_ram_rdata : 8'h00;

  assign sink_full     = (sink_count == (AW+1)'(DEPTH));
  assign recording     = sink_en && sink_en_q && !sink_full;
  assign sink_ram_addr = recording ? sink_count[AW-1:0] : sink_vaddr;
  assign sink_ram_we   = recording;
  assign sink_ram_din  = sink_word;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seq_running <= 1'b0;
      seq_ptr     <= '0;
      word_valid  <= 1'b0;
      sink_en_q   <= 1'b0;
      sink_count  <= '0;
    end else begin
      word_valid <= seq_running;
      if (seq_stop) begin
        seq_running <= 1'b0;
      end else if (seq_start) begin
        seq_running <= 1'b1;
        seq_ptr     <= '0;
      end else if (seq_running) begin
        if (seq_ptr == seq_end) begin
          seq_ptr     <= '0;
          seq_running <= seq_loop;
        end else begin
          seq_ptr <= seq_ptr + 1'b1;
        end
      end

      sink_en_q <= sink_en;
      if (sink_en && !sink_en_q) sink_count <= '0;
      else if (recording)        sink_count <= sink_count + 1'b1;
    end
  end
endmodule
