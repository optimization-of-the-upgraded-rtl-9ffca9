// sol40_pkg: constants, types and the register map shared by the SOL40
// clocking firmware, its PLL models and their testbenches.
//
// The clock counts and phase-step sizes follow the card as built: one
// internal PLL with two 240 MHz outputs, two Si5345 jitter cleaners with four
// outputs each (eight GBT transceiver banks), internal PLL steps of 104 ps and
// Si5345 steps of 72 ps. The 240 MHz period is taken as 4160 ps, the rounded
// value used for the reference clock period; the 40 MHz period is six of them.
// The register map, the phase-step target numbering and the encodings below
// are this design's own.
package sol40_pkg;
  timeunit 1ps; timeprecision 1ps;

  // Clock tree sizes
  localparam int unsigned N_FPLL_OUT   = 2;   // internal PLL outputs, one per Si5345
  localparam int unsigned N_SI5345     = 2;   // external jitter cleaners
  localparam int unsigned N_SI_OUT     = 4;   // GBT reference clocks per Si5345
  localparam int unsigned N_GBT_CLK    = N_SI5345 * N_SI_OUT;  // 8 GBT banks

  // Timing (ps)
  localparam int unsigned T240_PS      = 4160;          // 240 MHz period
  localparam int unsigned T40_PS       = 6 * T240_PS;   // 40 MHz period
  localparam int unsigned FPLL_STEP_PS = 104;           // internal PLL shift step
  localparam int unsigned SI_STEP_PS   = 72;            // Si5345 shift step

  // Phase-step targets: 0..1 internal PLL outputs, 2..9 Si5345 outputs
  // (target 2 + 4*s + o is output o of Si5345 number s).
  localparam int unsigned N_TARGETS    = N_FPLL_OUT + N_GBT_CLK;  // 10
  typedef logic [3:0] ps_target_t;

  // Register map (word addresses), 32-bit data
  typedef enum logic [7:0] {
    REG_ID        = 8'h00,  // RO  constant identifier
    REG_DDMTD_CTL = 8'h01,  // WO  bit0 reset, bit1 trigger (both self-clearing)
    REG_STATUS    = 8'h02,  // RO  [7:0] ddmtd done, [8] shift busy,
                            //     [9] tfc aligned, [10] fpll locked, [12:11] si locked,
                            //     [15:13] phase of clk40 in clk240 cycles
    REG_SHIFT_CMD = 8'h03,  // WO  [3:0] target, [4] up, [15:8] number of steps
    REG_TFC_STAT  = 8'h04,  // RO  [15:0] header realignments seen
    REG_PHASE0    = 8'h10,  // RO  0x10..0x17: [31] valid, [15:0] phase (helper cycles)
    REG_SHIFT0    = 8'h20   // RO  0x20..0x29: signed accumulated steps per target
  } reg_addr_e;

  localparam logic [31:0] SOL40_ID = 32'h5014_0ADF;

  typedef struct packed {
    logic [7:0] steps;
    logic       up;
    ps_target_t target;
  } shift_cmd_t;

endpackage
