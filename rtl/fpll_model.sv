// fpll_model: behavioural model of the FPGA internal fractional PLL.
// Not synthesizable: it stands for an analog vendor PLL and uses delays.
//
// The PLL takes the 40 MHz system clock and makes two 240 MHz clocks, one
// for each Si5345 jitter cleaner. Its defect, which the whole phase
// adjustment exists to correct, is that it does not keep its input-to-output
// phase across a loss of lock: after every lock each output comes up with a
// phase anywhere in the 4160 ps period. Its outputs can be shifted one by one
// in steps of 104 ps. Both facts are the document's; how long lock takes,
// the step handshake and its response time are this model's own.
//
// Model: LOCK_CYCLES reference edges after 'areset' falls, 'locked' rises and
// each output draws an offset uniform over one period. On every reference
// rising edge the model schedules MULT output periods, each starting at the
// reference edge plus the output's offset plus a whole number of periods.
// A phase step adds or removes STEP_PS from the offset; it takes effect from
// the next reference edge. Steps use a four-phase handshake: the model sees
// ps_req rise, waits PS_RESP_PS, applies the step to output ps_sel, raises
// ps_ack, and lowers it PS_RESP_PS after ps_req falls.
module fpll_model #(
  parameter int unsigned MULT        = 6,     // 40 MHz -> 240 MHz
  parameter int unsigned T_OUT_PS    = 4160,  // output period
  parameter int unsigned STEP_PS     = 104,   // phase shift resolution
  parameter int unsigned LOCK_CYCLES = 8,     // reference edges to lock
  parameter int unsigned PS_RESP_PS  = 20000  // handshake response time
) (
  input  logic       refclk,
  input  logic       areset,
  output logic       locked,
  output logic [1:0] outclk,
  input  logic       ps_req,
  input  logic       ps_up,
  input  logic       ps_sel,
  output logic       ps_ack
);
  timeunit 1ps; timeprecision 1ps;

  int unsigned off [2];   // output offsets after the reference edge, ps
  int unsigned lock_cnt;

  initial begin
    locked   = 1'b0;
    ps_ack   = 1'b0;
    lock_cnt = 0;
    off[0]   = T_OUT_PS;
    off[1]   = T_OUT_PS;
  end

  always @(posedge refclk or posedge areset) begin
    if (areset) begin
      locked   <= 1'b0;
      lock_cnt <= 0;
    end else if (!locked) begin
      if (lock_cnt == LOCK_CYCLES - 1) begin
        locked <= 1'b1;
        // random phase after every lock, kept at least one period so the
        // offset stays positive under shifts of either sign
        for (int i = 0; i < 2; i++)
          off[i] = T_OUT_PS + ($urandom % T_OUT_PS);
      end
      lock_cnt <= lock_cnt + 1;
    end
  end

  // One pulse train per output and per output period inside a reference
  // period; each output is the OR of its MULT trains.
  for (genvar i = 0; i < 2; i++) begin : g_out
    logic [MULT-1:0] pulse;
    initial pulse = '0;
    for (genvar k = 0; k < MULT; k++) begin : g_k
      always @(posedge refclk) begin
        if (locked) begin
          pulse[k] <= #(off[i] + k * T_OUT_PS)                1'b1;
          pulse[k] <= #(off[i] + k * T_OUT_PS + T_OUT_PS / 2) 1'b0;
        end
      end
    end
    assign outclk[i] = |pulse;
  end

  always begin
    @(posedge ps_req);
    #(PS_RESP_PS);
    if (ps_up)                             off[ps_sel] = off[ps_sel] + STEP_PS;
    else if (off[ps_sel] >= 2 * STEP_PS)   off[ps_sel] = off[ps_sel] - STEP_PS;
    ps_ack = 1'b1;
    wait (!ps_req);
    #(PS_RESP_PS);
    ps_ack = 1'b0;
  end

endmodule
