// sol40_fw: clocking part of the SOL40 control-card firmware.
//
// The SOL40 recovers the LHC-synchronous clock from the TFC stream and must
// hand the front-end links reference clocks of a known, repeatable phase.
// The clock path runs through an internal PLL that takes a random phase at
// every lock, so this firmware measures the eight GBT reference clocks and
// lets control software move them back to a setpoint. It holds:
//   * tfc_clk_gen          - 40 MHz system clock from the recovered 240 MHz
//                            clock and the header strobe;
//   * ddmtd_phase_monitor  - phase of each GBT reference clock against the
//                            recovered 240 MHz clock;
//   * phase_shift_ctrl     - phase steps for the internal PLL and Si5345s;
//   * a register file on the system clock through which software resets and
//     triggers the meter, reads the phases and commands phase steps.
// The split into these parts follows the card's block diagram; the register
// map (see sol40_pkg) and the reset scheme are this design's own.
//
// Register bus: synchronous to clk40. A write is reg_we with reg_addr and
// reg_wdata for one cycle. A read is reg_re with reg_addr for one cycle; the
// data comes back in reg_rdata with reg_rvalid one cycle later.
// Reset: 'rst' is synchronous to clk240_rec and resets the clock generator;
// it is resynchronised to clk40 for the rest. 'pll_rst' asks the internal
// PLL to reset while the firmware is in reset or the TFC link is down, which
// is how a loss of the TFC clock reaches the PLL.
module sol40_fw
  import sol40_pkg::*;
#(
  parameter int unsigned PHASE_W  = 16,
  parameter int unsigned DEGLITCH = 8
) (
  // TFC receiver side
  input  logic                   clk240_rec,
  input  logic                   rst,
  input  logic                   rx_ready,
  input  logic                   hdr_strobe,
  output logic                   clk40,
  output logic                   pll_rst,
  // clock tree
  input  logic                   clk_dmtd,
  input  logic [N_GBT_CLK-1:0]   gbt_refclk,
  input  logic                   fpll_locked,
  input  logic [N_SI5345-1:0]    si_locked,
  output logic                   fpll_ps_req,
  output logic                   fpll_ps_up,
  output logic                   fpll_ps_sel,
  input  logic                   fpll_ps_ack,
  output logic [N_SI5345-1:0]    si_ps_req,
  output logic                   si_ps_up,
  output logic [1:0]             si_ps_sel,
  input  logic [N_SI5345-1:0]    si_ps_ack,
  // register bus (clk40)
  input  logic [7:0]             reg_addr,
  input  logic                   reg_we,
  input  logic [31:0]            reg_wdata,
  input  logic                   reg_re,
  output logic [31:0]            reg_rdata,
  output logic                   reg_rvalid
);
  timeunit 1ps; timeprecision 1ps;

  // ---------------- 40 MHz system clock ----------------
  logic [2:0]  tfc_phase;
  logic        tfc_aligned;
  logic [15:0] realign_cnt;

  tfc_clk_gen u_clkgen (
    .clk240(clk240_rec), .rst, .rx_ready, .hdr_strobe,
    .clk40, .phase(tfc_phase), .aligned(tfc_aligned), .realign_cnt);

  logic [1:0] rst40_sync;
  logic       rst40;
  always_ff @(posedge clk40) rst40_sync <= {rst40_sync[0], rst | !rx_ready};
  assign rst40   = rst40_sync[1];
  assign pll_rst = rst40;

  // ---------------- register file ----------------
  logic                               ddmtd_reset, ddmtd_trigger;
  logic                               shift_valid;
  shift_cmd_t                         shift_cmd;
  logic [N_GBT_CLK-1:0]               ddmtd_done;
  logic [N_GBT_CLK-1:0][PHASE_W-1:0]  ddmtd_phase;
  logic                               shift_busy;
  logic [N_TARGETS-1:0][15:0]         shift_acc;
  logic                               fpll_lock_s1, fpll_lock_s2;
  logic [N_SI5345-1:0]                si_lock_s1, si_lock_s2;

  always_ff @(posedge clk40) begin
    fpll_lock_s1 <= fpll_locked;
    fpll_lock_s2 <= fpll_lock_s1;
    si_lock_s1  <= si_locked;
    si_lock_s2  <= si_lock_s1;
  end

  assign ddmtd_reset   = reg_we && (reg_addr == REG_DDMTD_CTL) && reg_wdata[0];
  assign ddmtd_trigger = reg_we && (reg_addr == REG_DDMTD_CTL) && reg_wdata[1];
  assign shift_valid   = reg_we && (reg_addr == REG_SHIFT_CMD);
  assign shift_cmd     = '{steps: reg_wdata[15:8], up: reg_wdata[4], target: reg_wdata[3:0]};

  always_ff @(posedge clk40) begin
    if (rst40) begin
      reg_rvalid <= 1'b0;
      reg_rdata  <= '0;
    end else begin
      reg_rvalid <= reg_re;
      if (reg_re) begin
        reg_rdata <= '0;
        if (reg_addr == REG_ID)
          reg_rdata <= SOL40_ID;
        else if (reg_addr == REG_STATUS)
          reg_rdata <= 32'({tfc_phase, si_lock_s2, fpll_lock_s2, tfc_aligned, shift_busy, ddmtd_done});
        else if (reg_addr == REG_TFC_STAT)
          reg_rdata <= {16'd0, realign_cnt};
        else if (reg_addr >= REG_PHASE0 && reg_addr < REG_PHASE0 + 8'(N_GBT_CLK))
          reg_rdata <= {ddmtd_done[3'(reg_addr - REG_PHASE0)], 15'd0,
                        16'(ddmtd_phase[3'(reg_addr - REG_PHASE0)])};
        else if (reg_addr >= REG_SHIFT0 && reg_addr < REG_SHIFT0 + 8'(N_TARGETS))
          reg_rdata <= {{16{shift_acc[4'(reg_addr - REG_SHIFT0)][15]}},
                        shift_acc[4'(reg_addr - REG_SHIFT0)]};
      end
    end
  end

  // realign_cnt, tfc_aligned and tfc_phase come from the clk240 domain
  // without resynchronisation: clk40 is made from clk240 by the clock
  // generator, so the two clocks have a fixed relation.

  // ---------------- phase meter ----------------
  ddmtd_phase_monitor #(.N_CH(N_GBT_CLK), .TS_W(PHASE_W), .DEGLITCH(DEGLITCH)) u_ddmtd (
    .clk_sys(clk40), .rst_sys(rst40),
    .sw_reset(ddmtd_reset), .sw_trigger(ddmtd_trigger),
    .done(ddmtd_done), .phase(ddmtd_phase),
    .clk_dmtd, .ref_clk(clk240_rec), .meas_clk(gbt_refclk));

  // ---------------- phase shift control ----------------
  phase_shift_ctrl #(.ACC_W(16)) u_shift (
    .clk(clk40), .rst(rst40),
    .cmd_valid(shift_valid), .cmd(shift_cmd),
    .busy(shift_busy), .acc(shift_acc),
    .fpll_ps_req, .fpll_ps_up, .fpll_ps_sel, .fpll_ps_ack,
    .si_ps_req, .si_ps_up, .si_ps_sel, .si_ps_ack);

  a_no_rd_wr: assert property (@(posedge clk40) disable iff (rst40) !(reg_we && reg_re));

endmodule
