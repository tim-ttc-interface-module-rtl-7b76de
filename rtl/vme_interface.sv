// vme_interface: VME64x slave of the TIM (the PLD1 CPLD), giving the local
// processor read and write access to the TIM registers.
//
// As the document requires, it answers A24/D16 or A32/D16 cycles (chosen by
// a32_mode) with a base address on A16-A23 (A16-A31 for A32) that is either
// preset (base_preset) or taken from the geographical address of the slot
// (use_ga). Choices of this design, where the document gives no detail: the
// accepted address modifiers are the standard data access codes 39/3D (A24)
// and 09/0D (A32); the geographical address sets A23-A19 of the base (the
// usual VME64x slot placement) with A18-A16 and, for A32, A31-A24 zero; only
// the lowest 256 bytes of the 64 kB window hold registers, and only D16 word
// cycles (both data strobes) are answered.
//
// The VME control lines are asynchronous. as_n and ds_n pass two synchroniser
// flip-flops; when both are active and the address matches, one lb_wr or
// lb_rd pulse goes to the register bank, read data is latched, and dtack_n is
// driven low (with d_oe high for a read) until the master releases the data
// strobes. irq_n follows irq_req (release-on-acknowledge is not modelled).
`timescale 1ns / 1ps
module vme_interface (
  input  logic        clk,
  input  logic        rst_n,
  // VME bus (after the buffers)
  input  logic        as_n,
  input  logic [1:0]  ds_n,
  input  logic        write_n,
  input  logic [5:0]  am,
  input  logic [31:1] a,
  input  logic [15:0] d_in,
  output logic [15:0] d_out,
  output logic        d_oe,
  output logic        dtack_n,
  output logic        irq_n,
  input  logic [4:0]  ga,
  // configuration (board switches)
  input  logic        a32_mode,
  input  logic        use_ga,
  input  logic [15:0] base_preset,
  // local bus to the register bank
  output logic [7:0]  lb_addr,
  output logic        lb_wr,
  output logic        lb_rd,
  output logic [15:0] lb_wdata,
  input  logic [15:0] lb_rdata,
  input  logic        irq_req
);
  typedef enum logic [1:0] {IDLE, ACK, WAIT_RELEASE} state_t;

  state_t      state;
  logic [1:0]  as_s, ds_s;
  logic        strobe;
  logic [15:0] base;
  logic        am_ok, match;

  assign strobe = as_s[1] && ds_s[1];
  assign base   = use_ga ? {8'h00, ga, 3'b000} : base_preset;
  assign am_ok  = a32_mode ? (am == 6'h09 || am == 6'h0D) : (am == 6'h39 || am == 6'h3D);
  assign match  = am_ok && (a32_mode ? (a[31:16] == base) : (a[23:16] == base[7:0]))
                  && (a[15:8] == 8'h00) && (ds_n == 2'b00);

  assign lb_addr  = {a[7:1], 1'b0};
  assign lb_wdata = d_in;
  assign irq_n    = !irq_req;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      as_s    <= '0;
      ds_s    <= '0;
      state   <= IDLE;
      lb_wr   <= 1'b0;
      lb_rd   <= 1'b0;
      d_out   <= '0;
      d_oe    <= 1'b0;
      dtack_n <= 1'b1;
    end else begin
      as_s  <= {as_s[0], !as_n};
      ds_s  <= {ds_s[0], !(ds_n[0] && ds_n[1])};
      lb_wr <= 1'b0;
      lb_rd <= 1'b0;
      unique case (state)
        IDLE: if (strobe && match) begin
          lb_wr <= !write_n;
          lb_rd <= write_n;
          state <= ACK;
        end
        ACK: begin
          if (lb_rd) d_out <= lb_rdata;
          d_oe    <= lb_rd;
          dtack_n <= 1'b0;
          state   <= WAIT_RELEASE;
        end
        WAIT_RELEASE: if (!ds_s[1]) begin
          dtack_n <= 1'b1;
          d_oe    <= 1'b0;
          state   <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
