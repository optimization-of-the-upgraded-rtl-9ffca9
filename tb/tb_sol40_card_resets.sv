// tb_sol40_card_resets: repeated clock losses with alignment after each.
//
// The figure of merit of the adjustable-phase scheme is the window in which
// the GBT reference clocks come back after many losses of the TFC clock.
// This test runs the same software procedure as tb_sol40_card (DDMTD
// readings corrected by the routing offsets, internal PLL steps of 104 ps
// for the first output of each Si5345, then 72 ps steps for the other
// outputs, repeated until all eight clocks are within MARGIN) after each of
// N_RESETS losses of the TFC link, at the design's default parameters. It
// records, independently of the DDMTD, the phase of every clock at the card
// output before and after each alignment, and reports:
//   * the spread before alignment (random over the 4160 ps period), which
//     must exceed 2 ns to show that the PLL really relocks at random;
//   * the window of all aligned phases, which must stay within 220 ps, the
//     window measured on the real system; by construction it is at most
//     2 x (52 + 36) ps plus measurement error.
// The simulation is jitter-free, so AVG is kept small to reach more resets.
module tb_sol40_card_resets;
  timeunit 1ps; timeprecision 1ps;
  import sol40_pkg::*;

  localparam int T        = T240_PS;
  localparam int AVG      = 2;      // measurements averaged per reading
  localparam int SETPOINT = 1000;   // ps after the recovered clock edge
  localparam int MARGIN   = 110;    // accepted distance from the setpoint
  localparam int N_LOSS   = 100;    // clock losses after the first lock
  localparam int WINDOW   = 220;    // accepted window of aligned phases, ps
  // routing offsets of the clocks to the DDMTD, as software would read them
  // from the firmware build's timing report
  localparam int OFFSET [N_GBT_CLK] = '{180, 230, 140, 260, 310, 120, 200, 270};

  logic clk240_rec = 1'b0, clk_dmtd = 1'b0;
  logic rst, rx_ready, hdr_strobe, clk40;
  logic [N_GBT_CLK-1:0] gbt_refclk;
  logic fpll_locked;
  logic [N_SI5345-1:0] si_locked;
  logic [7:0] reg_addr;
  logic reg_we, reg_re, reg_rvalid;
  logic [31:0] reg_wdata, reg_rdata;
  int checks = 0, failures = 0;
  int strobe_pos = 2;

  // mechanism counters
  int n_relock = 0, n_new_phase = 0, n_fpll_up = 0, n_fpll_down = 0;
  int n_si_steps = 0, n_meas = 0, n_realign = 0, n_rounds = 0, n_aligned = 0;

  always #(T/2) clk240_rec = ~clk240_rec;
  always begin #2080 clk_dmtd = 1'b1; #2081 clk_dmtd = 1'b0; end   // N = 4160

  int cyc240 = 0;
  always @(posedge clk240_rec) begin
    cyc240 <= cyc240 + 1;
    hdr_strobe <= ((cyc240 + 1) % 6 == strobe_pos);
  end

  sol40_card dut (.*);

  // ---- independent phase observer: last GBT edge minus last recovered edge
  time t_rec;
  time t_gbt [N_GBT_CLK];
  always @(posedge clk240_rec) t_rec = $time;
  for (genvar i = 0; i < N_GBT_CLK; i++) begin : g_obs
    always @(posedge gbt_refclk[i]) t_gbt[i] = $time;
  end
  function automatic int true_phase(input int i);
    return int'((t_gbt[i] - t_rec + time'(64 * T)) % time'(T));
  endfunction

  function automatic int wrap(input int x);   // into (-T/2, T/2]
    int y = x % T;
    if (y > T / 2)   y -= T;
    if (y <= -T / 2) y += T;
    return y;
  endfunction

  function automatic int rdiv(input int x, input int d);  // rounded division
    return (x >= 0) ? (x + d / 2) / d : -((-x + d / 2) / d);
  endfunction

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", msg, $time);
    end
  endtask

  // ---- register access, as software would do it
  task automatic reg_write(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk40);
    reg_addr = a; reg_wdata = d; reg_we = 1'b1;
    @(negedge clk40);
    reg_we = 1'b0;
  endtask

  task automatic reg_read(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk40);
    reg_addr = a; reg_re = 1'b1;
    @(negedge clk40);
    reg_re = 1'b0;
    d = reg_rdata;
  endtask

  // one DDMTD measurement of all channels, checked against the observer
  task automatic measure_once(output int ph [N_GBT_CLK]);
    logic [31:0] d;
    int n = 0;
    reg_write(REG_DDMTD_CTL, 32'h2);
    do begin reg_read(REG_STATUS, d); n++; end while (d[7:0] != 8'hFF && n < 2000);
    check(d[7:0] == 8'hFF, "DDMTD done");
    n_meas++;
    for (int i = 0; i < N_GBT_CLK; i++) begin
      reg_read(8'(REG_PHASE0 + i), d);
      ph[i] = (int'(d[15:0]) - OFFSET[i] + T) % T;   // offset compensation
      check(d[31], "phase valid");
      check(wrap(ph[i] - true_phase(i)) >= -3 && wrap(ph[i] - true_phase(i)) <= 3,
            $sformatf("DDMTD ch%0d %0d vs observed %0d", i, ph[i], true_phase(i)));
    end
  endtask

  // average of AVG measurements, unwrapped around the first
  task automatic measure(output int ph [N_GBT_CLK]);
    int one [N_GBT_CLK];
    int first [N_GBT_CLK];
    int sum [N_GBT_CLK];
    for (int k = 0; k < AVG; k++) begin
      measure_once(one);
      for (int i = 0; i < N_GBT_CLK; i++) begin
        if (k == 0) begin first[i] = one[i]; sum[i] = 0; end
        sum[i] += first[i] + wrap(one[i] - first[i]);
      end
    end
    for (int i = 0; i < N_GBT_CLK; i++) ph[i] = ((rdiv(sum[i], AVG) % T) + T) % T;
  endtask

  task automatic shift(input int target, input int steps);  // signed steps
    logic [31:0] d;
    if (steps == 0) return;
    reg_write(REG_SHIFT_CMD, {16'd0, 8'(steps > 0 ? steps : -steps), 3'd0,
                              steps > 0 ? 1'b1 : 1'b0, 4'(target)});
    do reg_read(REG_STATUS, d); while (d[8]);
    if (target < int'(N_FPLL_OUT)) begin
      if (steps > 0) n_fpll_up++; else n_fpll_down++;
    end else n_si_steps++;
  endtask

  task automatic align();
    int ph [N_GBT_CLK];
    bit ok = 0;
    for (int round = 0; round < 4 && !ok; round++) begin
      n_rounds++;
      measure(ph);
      // step 2: the internal PLL output s moves all of Si5345 s
      for (int s = 0; s < int'(N_SI5345); s++)
        shift(s, -rdiv(wrap(ph[s * N_SI_OUT] - SETPOINT), FPLL_STEP_PS));
      measure(ph);
      // step 3: the other outputs to the first of their Si5345
      for (int s = 0; s < int'(N_SI5345); s++)
        for (int o = 1; o < int'(N_SI_OUT); o++)
          shift(N_FPLL_OUT + s * N_SI_OUT + o,
                -rdiv(wrap(ph[s * N_SI_OUT + o] - ph[s * N_SI_OUT]), SI_STEP_PS));
      // step 4: verify
      measure(ph);
      ok = 1;
      for (int i = 0; i < N_GBT_CLK; i++)
        if (wrap(ph[i] - SETPOINT) > MARGIN || wrap(ph[i] - SETPOINT) < -MARGIN) ok = 0;
    end
    check(ok, "procedure converged");
    // independent check of the result
    repeat (2) @(posedge clk40);
    for (int i = 0; i < N_GBT_CLK; i++)
      check(wrap(true_phase(i) - SETPOINT) <= MARGIN && wrap(true_phase(i) - SETPOINT) >= -MARGIN,
            $sformatf("clock %0d at %0d ps, setpoint %0d", i, true_phase(i), SETPOINT));
    if (ok) n_aligned++;
  endtask

  task automatic wait_locked();
    logic [31:0] d;
    int n = 0;
    do begin reg_read(REG_STATUS, d); n++; end
    while (!(d[10] && d[12:11] == 2'b11) && n < 1000);
    check(d[10] && d[12:11] == 2'b11, "PLLs locked");
    check(d[9], "TFC clock aligned");
    n_relock++;
  endtask

  int pre_min = T, pre_max = -T;      // phase of clock 0 before alignment
  int post_min = T, post_max = -T;    // all clocks after alignment, vs setpoint

  task automatic record_post();
    for (int i = 0; i < N_GBT_CLK; i++) begin
      int e;
      e = wrap(true_phase(i) - SETPOINT);
      if (e < post_min) post_min = e;
      if (e > post_max) post_max = e;
    end
  endtask

  initial begin
    int pre;
    rst = 1'b1; rx_ready = 1'b0; reg_we = 1'b0; reg_re = 1'b0;
    reg_addr = '0; reg_wdata = '0;
    repeat (24) @(posedge clk240_rec);
    rst = 1'b0; rx_ready = 1'b1;
    wait_locked();
    align();
    record_post();
    for (int l = 0; l < N_LOSS; l++) begin
      rx_ready = 1'b0;
      repeat (200) @(posedge clk240_rec);
      check(!fpll_locked, "internal PLL lost lock");
      rx_ready = 1'b1;
      wait_locked();
      repeat (10) @(posedge clk40);
      pre = true_phase(0);
      if (pre < pre_min) pre_min = pre;
      if (pre > pre_max) pre_max = pre;
      align();
      record_post();
    end
    $display("resets=%0d: clock 0 before alignment %0d..%0d ps; after alignment all clocks %0d..%0d ps around the setpoint (window %0d ps)",
             N_LOSS, pre_min, pre_max, post_min, post_max, post_max - post_min);
    check(pre_max - pre_min > 2000, "random phase after relock spans more than 2 ns");
    check(post_max - post_min <= WINDOW, "aligned window within 220 ps");
    check(n_aligned == N_LOSS + 1, "aligned after every loss");
    check(n_fpll_up + n_fpll_down > 0 && n_si_steps > 0, "both PLL types stepped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40_000_000) @(posedge clk240_rec);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
