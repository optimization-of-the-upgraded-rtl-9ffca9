// tb_phase_shift_ctrl: self-checking test of the phase-step controller.
//
// Simple responders stand in for the internal PLL and the two Si5345s: each
// raises its acknowledge a few cycles after a request and drops it after the
// request falls, and counts the steps it received per output and direction.
// The test issues commands to several targets and checks, independently of
// the controller, that every device saw exactly the steps asked for on the
// right output, that the per-target counters agree, that commands given while
// busy or with a bad target are ignored, and that a step takes no fewer than
// six cycles.
module tb_phase_shift_ctrl;
  timeunit 1ps; timeprecision 1ps;
  import sol40_pkg::*;

  logic clk = 1'b0, rst, cmd_valid;
  shift_cmd_t cmd;
  logic busy;
  logic [N_TARGETS-1:0][15:0] acc;
  logic fpll_ps_req, fpll_ps_up, fpll_ps_sel, fpll_ps_ack;
  logic [N_SI5345-1:0] si_ps_req, si_ps_ack;
  logic si_ps_up;
  logic [1:0] si_ps_sel;
  int checks = 0, failures = 0;
  int seen [N_TARGETS];     // net steps seen by the responders
  int exp_steps [N_TARGETS];

  always #12480 clk = ~clk;

  phase_shift_ctrl #(.ACC_W(16)) dut (.*);

  // responders with a response time of 3 cycles
  initial begin
    fpll_ps_ack = 1'b0;
    forever begin
      @(posedge fpll_ps_req);
      repeat (3) @(posedge clk);
      seen[fpll_ps_sel] += fpll_ps_up ? 1 : -1;
      fpll_ps_ack = 1'b1;
      wait (!fpll_ps_req);
      repeat (3) @(posedge clk);
      fpll_ps_ack = 1'b0;
    end
  end
  for (genvar s = 0; s < N_SI5345; s++) begin : g_si
    initial begin
      si_ps_ack[s] = 1'b0;
      forever begin
        @(posedge si_ps_req[s]);
        repeat (2) @(posedge clk);
        seen[N_FPLL_OUT + s * N_SI_OUT + si_ps_sel] += si_ps_up ? 1 : -1;
        si_ps_ack[s] = 1'b1;
        wait (!si_ps_req[s]);
        repeat (2) @(posedge clk);
        si_ps_ack[s] = 1'b0;
      end
    end
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", msg, $time);
    end
  endtask

  task automatic issue(input int target, input bit up, input int steps, input bit valid_cmd);
    int cyc = 0;
    @(negedge clk);
    cmd = '{steps: 8'(steps), up: up, target: 4'(target)};
    cmd_valid = 1'b1;
    @(negedge clk);
    cmd_valid = 1'b0;
    if (valid_cmd) exp_steps[target] += up ? steps : -steps;
    while (busy) begin @(negedge clk); cyc++; end
    if (valid_cmd) check(cyc >= 6 * steps, "step duration");
    else           check(cyc == 0, "ignored command leaves controller idle");
    for (int t = 0; t < N_TARGETS; t++) begin
      check(seen[t] == exp_steps[t], $sformatf("target %0d saw %0d expected %0d", t, seen[t], exp_steps[t]));
      check($signed(acc[t]) == exp_steps[t], $sformatf("acc %0d", t));
    end
  endtask

  initial begin
    rst = 1'b1; cmd_valid = 1'b0; cmd = '0;
    foreach (seen[t]) begin seen[t] = 0; exp_steps[t] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 1'b0;
    issue(0, 1'b1, 5, 1'b1);
    issue(1, 1'b0, 3, 1'b1);
    issue(2, 1'b1, 2, 1'b1);
    issue(5, 1'b0, 4, 1'b1);
    issue(6, 1'b1, 1, 1'b1);
    issue(9, 1'b1, 7, 1'b1);
    issue(9, 1'b0, 2, 1'b1);
    issue(12, 1'b1, 3, 1'b0);   // no such target
    issue(3, 1'b1, 0, 1'b0);    // zero steps
    // command while busy is dropped
    @(negedge clk);
    cmd = '{steps: 8'd4, up: 1'b1, target: 4'd4}; cmd_valid = 1'b1;
    exp_steps[4] += 4;
    @(negedge clk);
    cmd = '{steps: 8'd9, up: 1'b1, target: 4'd7};
    @(negedge clk); cmd_valid = 1'b0;
    while (busy) @(negedge clk);
    check(seen[4] == 4 && seen[7] == 0, "command during busy ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
