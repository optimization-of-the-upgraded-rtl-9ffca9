// tb_sol40_card: end-to-end test of the SOL40 clock path with adjustable
// phases, at the design's default parameters.
//
// The test plays the TTC-PON receiver (recovered 240 MHz clock, header
// strobe, link-ready flag) and the control software. After each loss of the
// TFC link the internal PLL relocks at a random phase; the software then
// runs the alignment procedure:
//   1. average AVG DDMTD measurements of the eight GBT reference clocks;
//   2. step each internal PLL output until the first clock of its Si5345 is
//      as close as 104 ps steps allow to the setpoint;
//   3. measure again and step the other three outputs of each Si5345, in
//      72 ps steps, to the first one;
//   4. measure again and accept when all eight clocks sit within MARGIN of
//      the setpoint, otherwise repeat from 2.
// Independently of the DDMTD, the test time-stamps the GBT clock edges
// against the recovered clock and checks both that each DDMTD reading agrees
// with that and that the final phases are within MARGIN of the setpoint.
// Readings are corrected by the known routing offset of each clock to the
// DDMTD before use. It also moves the header once, to force a realignment of the 40 MHz clock.
// Each mechanism (relock at a new phase, internal PLL steps up and down,
// Si5345 steps, DDMTD measurements, header realignment, procedure repeated
// after a clock loss) is counted, and one that never happened is a failure.
module tb_sol40_card;
  timeunit 1ps; timeprecision 1ps;
  import sol40_pkg::*;

  localparam int T        = T240_PS;
  localparam int AVG      = 100;    // measurements averaged per reading
  localparam int SETPOINT = 1000;   // ps after the recovered clock edge
  localparam int MARGIN   = 110;    // accepted distance from the setpoint
  localparam int N_LOSS   = 2;      // clock losses after the first lock
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

  initial begin
    int ph_before [N_GBT_CLK];
    int cnt;
    logic [31:0] d;
    rst = 1'b1; rx_ready = 1'b0; reg_we = 1'b0; reg_re = 1'b0;
    reg_addr = '0; reg_wdata = '0;
    repeat (24) @(posedge clk240_rec);
    rst = 1'b0; rx_ready = 1'b1;
    wait_locked();
    align();
    for (int l = 0; l < N_LOSS; l++) begin
      for (int i = 0; i < N_GBT_CLK; i++) ph_before[i] = true_phase(i);
      // loss of the TFC link: the PLLs lose lock
      rx_ready = 1'b0;
      repeat (200) @(posedge clk240_rec);
      check(!fpll_locked, "internal PLL lost lock");
      if (l == 1) strobe_pos = 4;       // link returns with the header moved
      rx_ready = 1'b1;
      wait_locked();
      repeat (10) @(posedge clk40);
      cnt = 0;
      for (int i = 0; i < N_GBT_CLK; i++)
        if (wrap(true_phase(i) - ph_before[i]) > 52 || wrap(true_phase(i) - ph_before[i]) < -52) cnt++;
      if (cnt > 0) n_new_phase++;
      align();
    end
    reg_read(REG_TFC_STAT, d);
    n_realign = int'(d[15:0]);
    $display("relocks=%0d new_phase=%0d fpll_up=%0d fpll_down=%0d si_steps=%0d measurements=%0d realign=%0d rounds=%0d aligned=%0d",
             n_relock, n_new_phase, n_fpll_up, n_fpll_down, n_si_steps, n_meas, n_realign, n_rounds, n_aligned);
    check(n_relock == N_LOSS + 1, "relock after every loss");
    check(n_new_phase > 0, "a relock came back at a new phase");
    check(n_fpll_up > 0, "internal PLL stepped up");
    check(n_fpll_down > 0, "internal PLL stepped down");
    check(n_si_steps > 0, "Si5345 outputs stepped");
    check(n_meas > 0, "DDMTD measurements");
    check(n_realign >= 1, "header realignment");
    check(n_aligned == N_LOSS + 1, "aligned after every loss");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8_000_000) @(posedge clk240_rec);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
