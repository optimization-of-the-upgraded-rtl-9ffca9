// sol40_card: clock path of a SOL40 control card with adjustable phases.
//
// This is the board-level top: the FPGA firmware (sol40_fw, synthesizable)
// together with behavioural models of the FPGA internal PLL (fpll_model) and
// of the two Si5345 jitter cleaners (si5345_model). The clock routing is the
// card's: the 40 MHz system clock from the TFC receiver feeds the internal
// PLL; its two 240 MHz outputs feed one Si5345 each; the 2 x 4 Si5345 outputs
// are the reference clocks of the eight GBT transceiver banks and also go
// back to the DDMTD phase monitor in the FPGA. Software on the register bus
// measures those eight clocks and steps the PLLs until they sit at a
// setpoint. Because the top contains the PLL models it simulates but does not
// synthesize; sol40_fw is the part that goes into the FPGA.
//
// The TTC-PON receiver and transmitter, the GBT link cores and the
// transceivers are outside this top: the receiver's recovered 240 MHz clock,
// header strobe and ready flag are inputs, and the GBT reference clocks are
// outputs. The DDMTD helper clock (240 MHz * N/(N+1)) is an input too; on the
// card it would come from a further PLL, which the block diagram does not show.
//
// The DDMTD sees each clock after its routing inside the FPGA, not at the
// transceiver. DDMTD_PATH_PS models that routing delay per clock; control
// software subtracts the same offsets (on hardware, taken from the timing
// analysis of each firmware build) from the readings. The default values are
// illustrative, not taken from a real build.
module sol40_card
  import sol40_pkg::*;
#(
  // delay from each GBT reference clock input pin to its DDMTD sampler, ps
  parameter int unsigned DDMTD_PATH_PS [N_GBT_CLK] = '{180, 230, 140, 260, 310, 120, 200, 270}
) (
  input  logic                 clk240_rec,   // TTC-PON recovered clock
  input  logic                 rst,          // sync to clk240_rec
  input  logic                 rx_ready,     // TTC-PON link up
  input  logic                 hdr_strobe,   // TTC-PON header strobe
  input  logic                 clk_dmtd,     // DDMTD helper clock
  output logic                 clk40,        // system clock; register bus clock
  output logic [N_GBT_CLK-1:0] gbt_refclk,   // to the GBT transceiver banks
  output logic                 fpll_locked,
  output logic [N_SI5345-1:0]  si_locked,
  input  logic [7:0]           reg_addr,
  input  logic                 reg_we,
  input  logic [31:0]          reg_wdata,
  input  logic                 reg_re,
  output logic [31:0]          reg_rdata,
  output logic                 reg_rvalid
);
  timeunit 1ps; timeprecision 1ps;

  logic                pll_rst;
  logic [1:0]          fpll_out;
  logic                fpll_ps_req, fpll_ps_up, fpll_ps_sel, fpll_ps_ack;
  logic [N_SI5345-1:0] si_ps_req, si_ps_ack;
  logic [N_GBT_CLK-1:0] gbt_refclk_routed;   // as seen by the DDMTD
  logic                si_ps_up;
  logic [1:0]          si_ps_sel;

  sol40_fw u_fw (
    .clk240_rec, .rst, .rx_ready, .hdr_strobe, .clk40, .pll_rst,
    .clk_dmtd, .gbt_refclk(gbt_refclk_routed), .fpll_locked, .si_locked,
    .fpll_ps_req, .fpll_ps_up, .fpll_ps_sel, .fpll_ps_ack,
    .si_ps_req, .si_ps_up, .si_ps_sel, .si_ps_ack,
    .reg_addr, .reg_we, .reg_wdata, .reg_re, .reg_rdata, .reg_rvalid);

  fpll_model #(.MULT(6), .T_OUT_PS(T240_PS), .STEP_PS(FPLL_STEP_PS)) u_fpll (
    .refclk(clk40), .areset(pll_rst), .locked(fpll_locked), .outclk(fpll_out),
    .ps_req(fpll_ps_req), .ps_up(fpll_ps_up), .ps_sel(fpll_ps_sel),
    .ps_ack(fpll_ps_ack));

  for (genvar s = 0; s < N_SI5345; s++) begin : g_si
    si5345_model #(.N_OUT(N_SI_OUT), .T_PS(T240_PS), .STEP_PS(SI_STEP_PS)) u_si (
      .in_clk(fpll_out[s]), .rst(!fpll_locked), .locked(si_locked[s]),
      .out_clk(gbt_refclk[s*N_SI_OUT +: N_SI_OUT]),
      .ps_req(si_ps_req[s]), .ps_up(si_ps_up), .ps_sel(si_ps_sel),
      .ps_ack(si_ps_ack[s]));
  end

  for (genvar i = 0; i < N_GBT_CLK; i++) begin : g_route
    assign #(DDMTD_PATH_PS[i]) gbt_refclk_routed[i] = gbt_refclk[i];
  end

endmodule
