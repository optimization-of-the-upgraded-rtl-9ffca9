// tb_ddmtd_phase_monitor: self-checking test of the DDMTD phase meter.
//
// A 240 MHz reference (period 4160 ps) and eight copies of it delayed by
// known amounts drive the meter; the helper clock runs at 4161 ps, i.e.
// N = 4160, so one helper cycle stands for one picosecond and each channel
// should read its delay modulo 4160 within two counts. The test triggers
// several measurements with different delay sets (including 0 ps and delays
// close to a full period), checks that 'done' is masked right after a
// trigger, that a software reset clears it, and that one measurement ends
// within two beat periods (2 * 4160 helper cycles) plus synchronisation.
module tb_ddmtd_phase_monitor;
  timeunit 1ps; timeprecision 1ps;

  localparam int N_CH = 8;
  localparam int T    = 4160;
  localparam int TH   = 4161;
  localparam int TSYS = 6 * T;

  logic clk_sys = 1'b0, clk_dmtd = 1'b0, ref_clk = 1'b0;
  logic rst_sys, sw_reset, sw_trigger;
  logic [N_CH-1:0]            done;
  logic [N_CH-1:0][15:0]      phase;
  logic [N_CH-1:0]            meas_clk;
  int unsigned dly [N_CH];
  int checks = 0, failures = 0;

  always #(TSYS/2) clk_sys  = ~clk_sys;
  always #(T/2)    ref_clk  = ~ref_clk;
  // helper half periods 2080/2081 ps
  always begin #2080 clk_dmtd = 1'b1; #2081 clk_dmtd = 1'b0; end

  for (genvar i = 0; i < N_CH; i++) begin : g_meas
    initial meas_clk[i] = 1'b0;
    always @(posedge ref_clk) begin
      meas_clk[i] <= #(dly[i])         1'b1;
      meas_clk[i] <= #(dly[i] + T / 2) 1'b0;
    end
  end

  ddmtd_phase_monitor #(.N_CH(N_CH), .TS_W(16), .DEGLITCH(8)) dut (.*);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", msg, $time);
    end
  endtask

  task automatic measure(input int set);
    int cyc;
    int diff;
    @(negedge clk_sys); sw_trigger = 1'b1;
    @(negedge clk_sys); sw_trigger = 1'b0;
    check(done == '0, "done masked after trigger");
    cyc = 0;
    while (done != '1 && cyc < 2000) begin @(posedge clk_sys); cyc++; end
    // 2 beat periods of helper cycles, in system cycles, plus margin
    check(cyc <= (2 * T * TH) / TSYS + 10, "measurement time");
    for (int i = 0; i < N_CH; i++) begin
      diff = int'(phase[i]) - int'(dly[i] % T);
      if (diff >  T/2) diff -= T;
      if (diff < -T/2) diff += T;
      check(diff >= -2 && diff <= 2,
            $sformatf("set %0d ch %0d phase %0d expected %0d", set, i, phase[i], dly[i] % T));
    end
  endtask

  initial begin
    rst_sys = 1'b1; sw_reset = 1'b0; sw_trigger = 1'b0;
    foreach (dly[i]) dly[i] = T + 100 * i;
    repeat (4) @(posedge clk_sys);
    @(negedge clk_sys); rst_sys = 1'b0;
    repeat (4) @(posedge clk_sys);
    check(done == '0, "no result after reset");
    measure(0);
    // second set: edge cases around zero and a full period
    dly[0] = T;          dly[1] = T + 1;     dly[2] = 2 * T - 3;
    dly[3] = T + T / 2;  dly[4] = T + 1234;  dly[5] = T + 3999;
    dly[6] = T + 72;     dly[7] = T + 104;
    repeat (4) @(posedge clk_sys);
    measure(1);
    // results hold until the next trigger
    repeat (20) @(posedge clk_sys);
    check(done == '1, "done holds");
    // software reset clears the results
    @(negedge clk_sys); sw_reset = 1'b1;
    @(negedge clk_sys); sw_reset = 1'b0;
    repeat (4) @(posedge clk_sys);
    check(done == '0, "reset clears done");
    foreach (dly[i]) dly[i] = T + 517 * i + 33;
    repeat (4) @(posedge clk_sys);
    measure(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk_sys);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
