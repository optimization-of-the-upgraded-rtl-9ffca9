// si5345_model: behavioural model of one Si5345 jitter attenuator.
// Not synthesizable: it stands for an external analog PLL and uses delays.
//
// In the SOL40 each Si5345 takes one 240 MHz clock from the FPGA internal
// PLL and drives four 240 MHz reference clocks to four GBT transceiver banks.
// Each output can be shifted on its own in 72 ps steps; shifting the input
// moves all four outputs together. Those facts are the document's. Jitter
// attenuation is not modelled (the model is jitter free). The skew of each
// output after lock (uniform in 0..SKEW_MAX_PS, drawn anew at each lock), the
// fixed input-to-output delay, the lock time and the step handshake are this
// model's own.
//
// Model: LOCK_CYCLES input edges after 'rst' falls, 'locked' rises. Output i
// is then the input clock delayed by DELAY_PS + skew[i] + steps applied to
// it, with a 50 % duty cycle. Steps use the same four-phase handshake as
// fpll_model: ps_req up, PS_RESP_PS later output ps_sel moves by STEP_PS and
// ps_ack rises; ps_ack falls PS_RESP_PS after ps_req falls.
module si5345_model #(
  parameter int unsigned N_OUT       = 4,
  parameter int unsigned T_PS        = 4160,   // clock period
  parameter int unsigned DELAY_PS    = 4160,   // fixed input-to-output delay
  parameter int unsigned SKEW_MAX_PS = 500,    // output skew after lock
  parameter int unsigned STEP_PS     = 72,     // phase step
  parameter int unsigned LOCK_CYCLES = 16,
  parameter int unsigned PS_RESP_PS  = 50000   // serial-port write time
) (
  input  logic             in_clk,
  input  logic             rst,
  output logic             locked,
  output logic [N_OUT-1:0] out_clk,
  input  logic             ps_req,
  input  logic             ps_up,
  input  logic [1:0]       ps_sel,
  output logic             ps_ack
);
  timeunit 1ps; timeprecision 1ps;

  int unsigned dly [N_OUT];
  int unsigned lock_cnt;

  initial begin
    locked   = 1'b0;
    ps_ack   = 1'b0;
    lock_cnt = 0;
    for (int i = 0; i < int'(N_OUT); i++) dly[i] = DELAY_PS;
  end

  always @(posedge in_clk or posedge rst) begin
    if (rst) begin
      locked   <= 1'b0;
      lock_cnt <= 0;
    end else if (!locked) begin
      if (lock_cnt == LOCK_CYCLES - 1) begin
        locked <= 1'b1;
        for (int i = 0; i < int'(N_OUT); i++)
          dly[i] = DELAY_PS + ($urandom % (SKEW_MAX_PS + 1));
      end
      lock_cnt <= lock_cnt + 1;
    end
  end

  for (genvar i = 0; i < N_OUT; i++) begin : g_out
    initial out_clk[i] = 1'b0;
    always @(posedge in_clk) begin
      if (locked) begin
        out_clk[i] <= #(dly[i])            1'b1;
        out_clk[i] <= #(dly[i] + T_PS / 2) 1'b0;
      end
    end
  end

  always begin
    @(posedge ps_req);
    #(PS_RESP_PS);
    if (ps_up)                          dly[ps_sel] = dly[ps_sel] + STEP_PS;
    else if (dly[ps_sel] >= 2 * STEP_PS) dly[ps_sel] = dly[ps_sel] - STEP_PS;
    ps_ack = 1'b1;
    wait (!ps_req);
    #(PS_RESP_PS);
    ps_ack = 1'b0;
  end

endmodule
