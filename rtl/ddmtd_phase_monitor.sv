// ddmtd_phase_monitor: phase of N_CH clocks against one reference clock.
//
// A Digital Dual Mixer Time Difference (DDMTD) phase meter. All inputs are
// sampled by the helper clock clk_dmtd, N/(N+1) times the frequency of the
// clocks under test. A time offset dt of a measured clock after the reference
// then shows up as dt*N/T helper cycles between their sampled rising edges,
// so with T = 4160 ps and N = 4160 one helper cycle is one picosecond.
// In the SOL40 the reference is the 240 MHz clock recovered from the TFC
// stream and the measured clocks are the eight GBT transceiver reference
// clocks. Measuring the GBT clock phases against the recovered TFC clock with
// a DDMTD, and a software interface that can reset it, trigger a measurement
// and read the result, are the document's; the helper frequency, the channel
// state machine and the clock-domain crossing are this design's own.
//
// Operation (register side, clk_sys): a pulse on 'sw_reset' clears all
// results. A pulse on 'sw_trigger' starts one measurement on every channel:
// each channel waits for the next reference edge, then for the next edge of
// its own clock, and stores the difference of their time tags, a value in
// [0, N). 'done[i]' goes high when channel i holds a new result in 'phase[i]'.
// phase[i] is written in the helper domain and then held still while done[i]
// is high, which is what makes reading it from clk_sys safe. One measurement
// takes between one and two beat periods (N helper cycles each) plus a few
// cycles of synchronisation. Software averages many measurements.
module ddmtd_phase_monitor #(
  parameter int unsigned N_CH     = 8,
  parameter int unsigned TS_W     = 16,
  parameter int unsigned DEGLITCH = 8
) (
  // register side
  input  logic                       clk_sys,
  input  logic                       rst_sys,
  input  logic                       sw_reset,    // pulse: clear the meter
  input  logic                       sw_trigger,  // pulse: start a measurement
  output logic [N_CH-1:0]            done,
  output logic [N_CH-1:0][TS_W-1:0]  phase,
  // measurement side
  input  logic                       clk_dmtd,    // helper clock
  input  logic                       ref_clk,
  input  logic [N_CH-1:0]            meas_clk
);
  timeunit 1ps; timeprecision 1ps;

  typedef enum logic [1:0] {CH_IDLE, CH_WAIT_REF, CH_WAIT_MEAS, CH_DONE} ch_state_e;

  // ---------------- clk_sys -> clk_dmtd: request toggles ----------------
  logic trig_tog, rst_tog;
  always_ff @(posedge clk_sys) begin
    if (rst_sys) begin
      trig_tog <= 1'b0;
      rst_tog  <= 1'b0;
    end else begin
      if (sw_trigger) trig_tog <= ~trig_tog;
      if (sw_reset)   rst_tog  <= ~rst_tog;
    end
  end

  logic [2:0] trig_sync, rst_sync;
  logic       trig_d, rst_d;  // synchronous requests in the helper domain
  always_ff @(posedge clk_dmtd) begin
    trig_sync <= {trig_sync[1:0], trig_tog};
    rst_sync  <= {rst_sync[1:0],  rst_tog};
  end
  assign trig_d = trig_sync[2] ^ trig_sync[1];
  assign rst_d  = rst_sync[2]  ^ rst_sync[1];

  // Helper-domain reset: the register-side reset and the software reset.
  logic [1:0] rst_sys_sync;
  logic       rst_d_all;
  always_ff @(posedge clk_dmtd) rst_sys_sync <= {rst_sys_sync[0], rst_sys};
  assign rst_d_all = rst_sys_sync[1] | rst_d;

  // ---------------- helper domain ----------------
  logic [TS_W-1:0] ts;
  always_ff @(posedge clk_dmtd) begin
    if (rst_sys_sync[1]) ts <= '0;
    else                 ts <= ts + 1'b1;
  end

  logic            ref_edge;
  logic [TS_W-1:0] ref_ts;
  ddmtd_edge_detector #(.TS_W(TS_W), .DEGLITCH(DEGLITCH)) u_ref (
    .clk_dmtd, .rst(rst_d_all), .clk_in(ref_clk), .ts,
    .edge_pulse(ref_edge), .edge_ts(ref_ts));

  logic [N_CH-1:0]           done_d;
  logic [N_CH-1:0][TS_W-1:0] phase_d;

  for (genvar i = 0; i < N_CH; i++) begin : g_ch
    logic            m_edge;
    logic [TS_W-1:0] m_ts;
    logic [TS_W-1:0] start_ts;
    ch_state_e       st;

    ddmtd_edge_detector #(.TS_W(TS_W), .DEGLITCH(DEGLITCH)) u_meas (
      .clk_dmtd, .rst(rst_d_all), .clk_in(meas_clk[i]), .ts,
      .edge_pulse(m_edge), .edge_ts(m_ts));

    always_ff @(posedge clk_dmtd) begin
      if (rst_d_all) begin
        st         <= CH_IDLE;
        start_ts   <= '0;
        phase_d[i] <= '0;
      end else if (trig_d) begin
        st <= CH_WAIT_REF;
      end else begin
        unique case (st)
          CH_WAIT_REF: if (ref_edge) begin
            start_ts <= ref_ts;
            if (m_edge) begin  // both edges confirmed together
              phase_d[i] <= m_ts - ref_ts;
              st         <= CH_DONE;
            end else begin
              st <= CH_WAIT_MEAS;
            end
          end
          CH_WAIT_MEAS: if (m_edge) begin
            phase_d[i] <= m_ts - start_ts;
            st         <= CH_DONE;
          end
          default: ;
        endcase
      end
    end
    assign done_d[i] = (st == CH_DONE);
  end

  // Acknowledge of the trigger back to clk_sys, so that 'done' from the
  // previous measurement is masked until the channels have been re-armed.
  logic ack_tog;
  always_ff @(posedge clk_dmtd) begin
    if (rst_sys_sync[1]) ack_tog <= 1'b0;
    else if (trig_d)     ack_tog <= ~ack_tog;
  end

  // ---------------- clk_dmtd -> clk_sys ----------------
  logic [N_CH-1:0] done_s1, done_s2;
  logic [2:0]      ack_sync;
  logic            pending;
  always_ff @(posedge clk_sys) begin
    done_s1  <= done_d;
    done_s2  <= done_s1;
    ack_sync <= {ack_sync[1:0], ack_tog};
    if (rst_sys)                          pending <= 1'b0;
    else if (sw_trigger)                  pending <= 1'b1;
    else if (ack_sync[2] ^ ack_sync[1])   pending <= 1'b0;
  end

  assign done  = pending ? '0 : done_s2;
  assign phase = phase_d;

endmodule
