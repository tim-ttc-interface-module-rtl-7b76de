// tim_regs: register bank of the TIM, through which the local processor
// configures the module and inspects it.
//
// The document says the TIM is set up by the local processor writing its
// registers and that they can be read back; it names register 08 (trigger
// window size and delay) and register 0A (stand-alone clock delay). The rest
// of the map (tim_pkg::REG_*) and every field is this design's choice.
// Access is by the local bus from vme_interface: lb_wr or lb_rd pulse for one
// cycle with a byte address (D16 words at even addresses); lb_rdata is
// combinational from lb_addr. Writing REG_CMD gives one-cycle pulses: bits
// [5:0] are the fast commands (see tim_pkg::fast_cmd_t), bit 6 starts and bit
// 7 stops the sequencer, bit 8 clears the FIFO overflow flags. The sequencer
// and sink RAMs are reached through an address register and a data register;
// each data access moves the address on by one. Status inputs are read as
// they are. After reset the control register selects stand-alone mode with
// the internal clock (CTRL_RESET), so that the module has a clock whether or
// not a TTC signal is present.
`timescale 1ns / 1ps
module tim_regs
  import tim_pkg::*;
#(
  parameter int unsigned N_RODS    = 16,
  parameter int unsigned SEQ_DEPTH = 32768,
  parameter logic [15:0] CTRL_RESET = 16'h0003,  // SA mode, internal clock
  localparam int unsigned AW       = $clog2(SEQ_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  // local bus
  input  logic [7:0]        lb_addr,
  input  logic              lb_wr,
  input  logic              lb_rd,
  input  logic [15:0]       lb_wdata,
  output logic [15:0]       lb_rdata,
  // configuration
  output ctrl_t             ctrl,
  output fast_cmd_t         vme_cmd,
  output logic              seq_start,
  output logic              seq_stop,
  output logic              clr_ovf,
  output logic [15:0]       trig_period,
  output logic [15:0]       ecr_period,
  output logic [15:0]       window,
  output logic [7:0]        saclk_dly,
  output logic [TTID_W-1:0] sa_ttid,
  output logic [7:0]        trig_dly,
  output logic [N_RODS-1:0] busy_mask,
  output logic [N_RODS-1:0] busy_clr,
  output logic [5:0]        ext_mask,
  output logic [15:0]       trig_num,
  output logic [AW-1:0]     seq_end,
  // sequencer and sink RAM access
  output logic [AW-1:0]     seq_vaddr,
  output logic              seq_vwe,
  output logic [7:0]        seq_vwdata,
  input  logic [7:0]        seq_rdata,
  output logic [AW-1:0]     sink_vaddr,
  input  logic [7:0]        sink_rdata,
  input  logic [AW:0]       sink_count,
  // status
  input  logic [N_RODS-1:0] busy_status,
  input  logic [N_RODS-1:0] busy_latched,
  input  logic [L1ID_W-1:0] last_l1id,
  input  logic [BCID_W-1:0] last_bcid,
  input  logic [15:0]       trig_cnt,
  input  logic [7:0]        status,
  input  logic              clk_fail,
  output logic              irq_req
);
  logic wr_cmd;

  assign wr_cmd     = lb_wr && (lb_addr == REG_CMD);
  assign vme_cmd    = wr_cmd ? fast_cmd_t'(lb_wdata[5:0]) : NO_CMD;
  assign seq_start  = wr_cmd && lb_wdata[6];
  assign seq_stop   = wr_cmd && lb_wdata[7];
  assign clr_ovf    = wr_cmd && lb_wdata[8];
  assign busy_clr   = (lb_wr && (lb_addr == REG_BUSY_LAT)) ? lb_wdata[N_RODS-1:0] : '0;
  assign seq_vwe    = lb_wr && (lb_addr == REG_SEQ_DATA);
  assign seq_vwdata = lb_wdata[7:0];
  assign irq_req    = ctrl.irq_en && clk_fail;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl        <= ctrl_t'(CTRL_RESET);
      trig_period <= '0;
      ecr_period  <= '0;
      window      <= '0;
      saclk_dly   <= '0;
      sa_ttid     <= '0;
      trig_dly    <= '0;
      busy_mask   <= '1;
      ext_mask    <= '0;
      trig_num    <= '0;
      seq_end     <= '1;
      seq_vaddr   <= '0;
      sink_vaddr  <= '0;
    end else begin
      if (lb_wr) begin
        unique case (lb_addr)
          REG_CTRL:      ctrl        <= ctrl_t'(lb_wdata);
          REG_TRIG_PER:  trig_period <= lb_wdata;
          REG_ECR_PER:   ecr_period  <= lb_wdata;
          REG_WINDOW:    window      <= lb_wdata;
          REG_SACLK_DLY: saclk_dly   <= lb_wdata[7:0];
          REG_TTID:      sa_ttid     <= lb_wdata[TTID_W-1:0];
          REG_TRIG_DLY:  trig_dly    <= lb_wdata[7:0];
          REG_BUSY_MASK: busy_mask   <= lb_wdata[N_RODS-1:0];
          REG_EXT_MASK:  ext_mask    <= lb_wdata[5:0];
          REG_TRIG_NUM:  trig_num    <= lb_wdata;
          REG_SEQ_END:   seq_end     <= lb_wdata[AW-1:0];
          REG_SEQ_ADDR:  seq_vaddr   <= lb_wdata[AW-1:0];
          REG_SEQ_DATA:  seq_vaddr   <= seq_vaddr + 1'b1;
          REG_SINK_ADDR: sink_vaddr  <= lb_wdata[AW-1:0];
          default: ;
        endcase
      end
      if (lb_rd && lb_addr == REG_SEQ_DATA)  seq_vaddr  <= seq_vaddr + 1'b1;
      if (lb_rd && lb_addr == REG_SINK_DATA) sink_vaddr <= sink_vaddr + 1'b1;
    end
  end

  always_comb begin
    lb_rdata = '0;
    unique case (lb_addr)
      REG_CTRL:      lb_rdata = 16'(ctrl);
      REG_TRIG_PER:  lb_rdata = trig_period;
      REG_ECR_PER:   lb_rdata = ecr_period;
      REG_WINDOW:    lb_rdata = window;
      REG_SACLK_DLY: lb_rdata = 16'(saclk_dly);
      REG_TTID:      lb_rdata = 16'(sa_ttid);
      REG_TRIG_DLY:  lb_rdata = 16'(trig_dly);
      REG_BUSY_MASK: lb_rdata = 16'(busy_mask);
      REG_BUSY_STAT: lb_rdata = 16'(busy_status);
      REG_BUSY_LAT:  lb_rdata = 16'(busy_latched);
      REG_SEQ_ADDR:  lb_rdata = 16'(seq_vaddr);
      REG_SEQ_DATA:  lb_rdata = 16'(seq_rdata);
      REG_SEQ_END:   lb_rdata = 16'(seq_end);
      REG_SINK_ADDR: lb_rdata = 16'(sink_vaddr);
      REG_SINK_DATA: lb_rdata = 16'(sink_rdata);
      REG_SINK_CNT:  lb_rdata = 16'(sink_count);
      REG_L1ID_LO:   lb_rdata = last_l1id[15:0];
      REG_L1ID_HI:   lb_rdata = 16'(last_l1id[L1ID_W-1:16]);
      REG_BCID:      lb_rdata = 16'(last_bcid);
      REG_STATUS:    lb_rdata = {7'd0, clk_fail, status};
      REG_EXT_MASK:  lb_rdata = 16'(ext_mask);
      REG_TRIG_NUM:  lb_rdata = trig_num;
      REG_TRIG_CNT:  lb_rdata = trig_cnt;
      default:       lb_rdata = '0;
    endcase
  end
endmodule
