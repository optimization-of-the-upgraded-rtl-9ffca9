// tb_fpll_model: self-checking test of the internal PLL model.
//
// Feeds a 40 MHz reference (24960 ps) and checks: lock after reset; both
// outputs run at 4160 ps; the phase of each output against the reference is
// steady from one reference period to the next; a step up or down on one
// output moves that output by exactly 104 ps and leaves the other alone;
// each step is acknowledged; and over several resets the phases come back
// at different places (the random phase after lock).
module tb_fpll_model;
  timeunit 1ps; timeprecision 1ps;

  localparam int T   = 4160;
  localparam int TREF = 6 * T;

  logic refclk = 1'b0, areset, locked, ps_req, ps_up, ps_sel, ps_ack;
  logic [1:0] outclk;
  int checks = 0, failures = 0;
  time t_ref;
  time t_out [2];
  time t_prev [2];

  always #(TREF/2) refclk = ~refclk;

  fpll_model dut (.*);

  always @(posedge refclk) t_ref = $time;
  for (genvar i = 0; i < 2; i++) begin : g_mon
    always @(posedge outclk[i]) begin
      t_prev[i] = t_out[i];
      t_out[i]  = $time;
    end
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", msg, $time);
    end
  endtask

  function automatic int phase_of(input int i);
    return int'((t_out[i] - t_ref) % T);
  endfunction

  // wait for a few reference periods, then return the phase of output i and
  // check it is steady and the period is right
  task automatic settle(output int ph [2]);
    int p0 [2];
    repeat (3) @(posedge refclk);
    @(negedge refclk);
    for (int i = 0; i < 2; i++) begin
      p0[i] = phase_of(i);
      check(t_out[i] - t_prev[i] == T, $sformatf("period out%0d", i));
    end
    @(negedge refclk);
    for (int i = 0; i < 2; i++) begin
      ph[i] = phase_of(i);
      check(ph[i] == p0[i], $sformatf("steady phase out%0d", i));
    end
  endtask

  task automatic step(input bit sel, input bit up);
    ps_sel = sel; ps_up = up; ps_req = 1'b1;
    wait (ps_ack);
    ps_req = 1'b0;
    wait (!ps_ack);
    checks++;
  endtask

  initial begin
    int ph [2], ph2 [2];
    int first [2];
    int differ = 0;
    areset = 1'b1; ps_req = 1'b0; ps_up = 1'b0; ps_sel = 1'b0;
    t_ref = 0; t_out = '{0, 0}; t_prev = '{0, 0};
    repeat (2) @(posedge refclk);
    areset = 1'b0;
    repeat (10) @(posedge refclk);
    check(locked, "locked");
    settle(ph);
    step(1'b0, 1'b1);
    settle(ph2);
    check((ph2[0] - ph[0] + T) % T == 104, "out0 +104 ps");
    check(ph2[1] == ph[1], "out1 unchanged");
    step(1'b1, 1'b0);
    step(1'b1, 1'b0);
    settle(ph);
    check((ph2[1] - ph[1] + T) % T == 208, "out1 -208 ps");
    check(ph[0] == ph2[0], "out0 unchanged");
    first = ph;
    // relock several times: the phase is drawn anew
    for (int r = 0; r < 4; r++) begin
      areset = 1'b1;
      @(posedge refclk);
      check(!locked, "lock lost on reset");
      areset = 1'b0;
      repeat (10) @(posedge refclk);
      check(locked, "relocked");
      settle(ph);
      if (ph[0] != first[0] || ph[1] != first[1]) differ++;
    end
    check(differ > 0, "phase changes across relocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge refclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
