// phase_shift_ctrl: software-driven phase stepping of the SOL40 clock tree.
//
// Control software aligns the GBT reference clocks by shifting, one step at
// a time, the two outputs of the FPGA internal PLL (104 ps per step, moving
// all four outputs of the Si5345 fed by that output) and each of the eight
// Si5345 outputs on its own (72 ps per step). This block takes a command
// (target, direction, number of steps), issues the steps one by one to the
// PLL that owns the target and keeps a signed count of the steps applied to
// each target, so software can read back where every clock was moved.
// Which clocks are shifted and the step sizes are the document's; the
// command format and the handshake are this design's own.
//
// Interface: 'cmd_valid' with 'cmd' starts a command when 'busy' is low;
// a command given while busy, for a target above 9 or with zero steps is
// ignored. Targets 0 and 1 are internal PLL outputs; target 2+4*s+o is
// output o of Si5345 s. Each step is a four-phase handshake (req up, wait
// for ack, req down, wait for ack down) so the PLL side may run on any
// clock: the acknowledges are resynchronised here with two flip-flops. A step
// therefore takes at least six clk cycles plus the PLL's own response time.
module phase_shift_ctrl
  import sol40_pkg::*;
#(
  parameter int unsigned ACC_W = 16
) (
  input  logic                            clk,
  input  logic                            rst,
  input  logic                            cmd_valid,
  input  shift_cmd_t                      cmd,
  output logic                            busy,
  output logic [N_TARGETS-1:0][ACC_W-1:0] acc,     // signed step counts
  // internal PLL dynamic phase shift
  output logic                            fpll_ps_req,
  output logic                            fpll_ps_up,
  output logic                            fpll_ps_sel,
  input  logic                            fpll_ps_ack,
  // Si5345 output phase steps
  output logic [N_SI5345-1:0]             si_ps_req,
  output logic                            si_ps_up,
  output logic [1:0]                      si_ps_sel,
  input  logic [N_SI5345-1:0]             si_ps_ack
);
  timeunit 1ps; timeprecision 1ps;

  typedef enum logic [1:0] {S_IDLE, S_REQ, S_REL} state_e;
  state_e     st;
  shift_cmd_t cur;
  logic [7:0] left;
  logic       req;

  // acknowledge of the device that owns the current target, resynchronised
  logic [1:0] fpll_ack_s;
  logic [N_SI5345-1:0] si_ack_s1, si_ack_s2;
  always_ff @(posedge clk) begin
    fpll_ack_s <= {fpll_ack_s[0], fpll_ps_ack};
    si_ack_s1  <= si_ps_ack;
    si_ack_s2  <= si_ack_s1;
  end

  logic       is_fpll;
  logic [3:0] si_rel;   // target minus the internal PLL targets
  logic       si_idx;
  logic       ack;
  assign is_fpll = (cur.target < ps_target_t'(N_FPLL_OUT));
  assign si_rel  = cur.target - ps_target_t'(N_FPLL_OUT);
  assign si_idx  = si_rel[2];
  assign ack     = is_fpll ? fpll_ack_s[1] : si_ack_s2[si_idx];

  always_ff @(posedge clk) begin
    if (rst) begin
      st   <= S_IDLE;
      cur  <= '0;
      left <= '0;
      req  <= 1'b0;
      acc  <= '0;
    end else begin
      unique case (st)
        S_IDLE: if (cmd_valid && cmd.steps != 8'd0 &&
                    cmd.target < ps_target_t'(N_TARGETS)) begin
          cur  <= cmd;
          left <= cmd.steps;
          req  <= 1'b1;
          st   <= S_REQ;
        end
        S_REQ: if (ack) begin
          req <= 1'b0;
          st  <= S_REL;
          if (cur.up) acc[cur.target] <= acc[cur.target] + ACC_W'(1);
          else        acc[cur.target] <= acc[cur.target] - ACC_W'(1);
        end
        S_REL: if (!ack) begin
          if (left == 8'd1) begin
            st <= S_IDLE;
          end else begin
            left <= left - 8'd1;
            req  <= 1'b1;
            st   <= S_REQ;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy        = (st != S_IDLE);
  assign fpll_ps_req = req && is_fpll;
  assign fpll_ps_up  = cur.up;
  assign fpll_ps_sel = cur.target[0];
  for (genvar s = 0; s < N_SI5345; s++) begin : g_si
    assign si_ps_req[s] = req && !is_fpll && (si_idx == 1'(s));
  end
  assign si_ps_up  = cur.up;
  assign si_ps_sel = si_rel[1:0];

  // The request to a device is only withdrawn after that device acknowledged.
  a_req_held: assert property (@(posedge clk) disable iff (rst)
                               (st == S_REQ && !ack) |=> req);

endmodule
