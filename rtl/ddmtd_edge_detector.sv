// ddmtd_edge_detector: one DDMTD input channel (sampler, deglitcher, time tag).
//
// The clock under test is sampled as data by the DDMTD helper clock, whose
// frequency is N/(N+1) of the clock under test. The sampled waveform is the
// clock under test slowed down N times: a time offset dt between two clocks
// becomes dt*N/T helper cycles between their sampled edges. The first
// flip-flop is the mixer; two more resynchronise it.
//
// Near an edge the sampled signal can flicker between 0 and 1 (jitter, or
// metastability of the mixer flop). The deglitcher accepts a new level only
// after DEGLITCH samples in a row agree, and reports a rising edge with the
// time tag of the first sample of that run. Time tags come from the shared
// free-running counter 'ts', so all channels fed from one counter can be
// subtracted from each other. The deglitching scheme and its threshold are
// this design's own; the document names the DDMTD method only.
//
// Timing: 'edge_pulse' is high for one helper cycle, DEGLITCH+2 cycles after
// the first sample that saw the new level; 'edge_ts' holds until the next edge.
module ddmtd_edge_detector #(
  parameter int unsigned TS_W     = 16,
  parameter int unsigned DEGLITCH = 8
) (
  input  logic            clk_dmtd,
  input  logic            rst,         // synchronous to clk_dmtd
  input  logic            clk_in,      // clock under test, sampled as data
  input  logic [TS_W-1:0] ts,          // free-running helper-cycle counter
  output logic            edge_pulse,  // confirmed rising edge
  output logic [TS_W-1:0] edge_ts      // time tag of that edge
);
  timeunit 1ps; timeprecision 1ps;

  logic mix, sync1, sync2;
  logic level;                                  // accepted level
  logic [$clog2(DEGLITCH+1)-1:0] run;           // samples differing from level
  logic [TS_W-1:0] cand_ts;
  // time tag of the sample now in sync2: two cycles older than ts
  logic [TS_W-1:0] ts_s2;
  assign ts_s2 = ts - TS_W'(2);

  always_ff @(posedge clk_dmtd) begin
    mix   <= clk_in;
    sync1 <= mix;
    sync2 <= sync1;
  end

  always_ff @(posedge clk_dmtd) begin
    edge_pulse <= 1'b0;
    if (rst) begin
      level   <= 1'b0;
      run     <= '0;
      cand_ts <= '0;
      edge_ts <= '0;
    end else if (sync2 == level) begin
      run <= '0;
    end else begin
      if (run == '0) cand_ts <= ts_s2;
      if (run == ($bits(run))'(DEGLITCH - 1)) begin
        level <= sync2;
        run   <= '0;
        if (sync2) begin
          edge_pulse <= 1'b1;
          edge_ts    <= (run == '0) ? ts_s2 : cand_ts;
        end
      end else begin
        run <= run + 1'b1;
      end
    end
  end

endmodule
