// tb_sol40_fw: self-checking test of the SOL40 clocking firmware through its
// register bus.
//
// The eight GBT reference clocks are copies of the recovered 240 MHz clock
// with delays set by the test, and simple responders acknowledge phase
// steps. Through registers only, the test reads the identifier and status,
// triggers DDMTD measurements and compares the eight phases with the delays
// it applied, commands phase steps and checks that the right device and
// output saw them and that the step counters read back, checks the header
// realignment counter and that a dropped TFC link resets the PLL.
module tb_sol40_fw;
  timeunit 1ps; timeprecision 1ps;
  import sol40_pkg::*;

  localparam int T = 4160;

  logic clk240_rec = 1'b0, clk_dmtd = 1'b0;
  logic rst, rx_ready, hdr_strobe, clk40, pll_rst;
  logic [N_GBT_CLK-1:0] gbt_refclk;
  logic fpll_locked;
  logic [N_SI5345-1:0] si_locked;
  logic fpll_ps_req, fpll_ps_up, fpll_ps_sel, fpll_ps_ack;
  logic [N_SI5345-1:0] si_ps_req, si_ps_ack;
  logic si_ps_up;
  logic [1:0] si_ps_sel;
  logic [7:0] reg_addr;
  logic reg_we, reg_re, reg_rvalid;
  logic [31:0] reg_wdata, reg_rdata;
  int unsigned dly [N_GBT_CLK];
  int seen [N_TARGETS];
  int checks = 0, failures = 0;
  int strobe_pos = 0;

  always #(T/2) clk240_rec = ~clk240_rec;
  always begin #2080 clk_dmtd = 1'b1; #2081 clk_dmtd = 1'b0; end

  // header strobe every six cycles at a position the test can move
  int cyc240 = 0;
  always @(posedge clk240_rec) begin
    cyc240 <= cyc240 + 1;
    hdr_strobe <= ((cyc240 + 1) % 6 == strobe_pos);
  end

  for (genvar i = 0; i < N_GBT_CLK; i++) begin : g_clk
    initial gbt_refclk[i] = 1'b0;
    always @(posedge clk240_rec) begin
      gbt_refclk[i] <= #(dly[i])         1'b1;
      gbt_refclk[i] <= #(dly[i] + T / 2) 1'b0;
    end
  end

  initial begin
    fpll_ps_ack = 1'b0;
    forever begin
      @(posedge fpll_ps_req);
      #30000;
      seen[fpll_ps_sel] += fpll_ps_up ? 1 : -1;
      fpll_ps_ack = 1'b1;
      wait (!fpll_ps_req);
      #30000;
      fpll_ps_ack = 1'b0;
    end
  end
  for (genvar s = 0; s < N_SI5345; s++) begin : g_si
    initial begin
      si_ps_ack[s] = 1'b0;
      forever begin
        @(posedge si_ps_req[s]);
        #40000;
        seen[N_FPLL_OUT + s * N_SI_OUT + si_ps_sel] += si_ps_up ? 1 : -1;
        si_ps_ack[s] = 1'b1;
        wait (!si_ps_req[s]);
        #40000;
        si_ps_ack[s] = 1'b0;
      end
    end
  end

  sol40_fw dut (.*);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", msg, $time);
    end
  endtask

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
    check(reg_rvalid, "read data valid one cycle after request");
    d = reg_rdata;
  endtask

  task automatic measure_and_check();
    logic [31:0] d;
    int n = 0;
    int diff;
    reg_write(REG_DDMTD_CTL, 32'h2);
    do begin reg_read(REG_STATUS, d); n++; end while (d[7:0] != 8'hFF && n < 1000);
    check(d[7:0] == 8'hFF, "all channels done");
    for (int i = 0; i < N_GBT_CLK; i++) begin
      reg_read(8'(REG_PHASE0 + i), d);
      diff = int'(d[15:0]) - int'(dly[i] % T);
      if (diff > T/2) diff -= T;
      if (diff < -T/2) diff += T;
      check(d[31] && diff >= -2 && diff <= 2,
            $sformatf("phase %0d read %0d applied %0d", i, d[15:0], dly[i] % T));
    end
  endtask

  task automatic shift(input int target, input bit up, input int steps);
    logic [31:0] d;
    reg_write(REG_SHIFT_CMD, {16'd0, 8'(steps), 3'd0, up, 4'(target)});
    do reg_read(REG_STATUS, d); while (d[8]);
  endtask

  initial begin
    logic [31:0] d;
    rst = 1'b1; rx_ready = 1'b0; reg_we = 1'b0; reg_re = 1'b0;
    reg_addr = '0; reg_wdata = '0; fpll_locked = 1'b0; si_locked = '0;
    foreach (seen[t]) seen[t] = 0;
    foreach (dly[i]) dly[i] = T + 400 * i + 17;
    repeat (24) @(posedge clk240_rec);
    rst = 1'b0; rx_ready = 1'b1;
    repeat (24) @(posedge clk240_rec);
    fpll_locked = 1'b1; si_locked = 2'b11;
    check(!pll_rst, "PLL reset released with link up");
    reg_read(REG_ID, d);
    check(d == SOL40_ID, "identifier");
    repeat (8) @(posedge clk40);
    reg_read(REG_STATUS, d);
    check(d[9] && d[10] && d[12:11] == 2'b11, "status: aligned and locked");
    measure_and_check();
    foreach (dly[i]) dly[i] = T + (T - 300 * i - 5) % T;
    repeat (4) @(posedge clk40);
    measure_and_check();
    // phase steps
    shift(0, 1'b1, 3);
    shift(1, 1'b0, 2);
    shift(4, 1'b1, 5);
    shift(9, 1'b0, 1);
    check(seen[0] == 3 && seen[1] == -2 && seen[4] == 5 && seen[9] == -1,
          "steps reached the right outputs");
    reg_read(8'(REG_SHIFT0 + 1), d);
    check($signed(d) == -2, "step counter target 1");
    reg_read(8'(REG_SHIFT0 + 4), d);
    check($signed(d) == 5, "step counter target 4");
    // header moves: realignment counted
    reg_read(REG_TFC_STAT, d);
    begin
      int n_before;
      n_before = int'(d[15:0]);
      strobe_pos = 3;
      repeat (12) @(posedge clk40);
      reg_read(REG_TFC_STAT, d);
      check(int'(d[15:0]) == n_before + 1, $sformatf("header realignment counted %0d -> %0d", n_before, d[15:0]));
    end
    // link loss drives the PLL reset
    rx_ready = 1'b0;
    repeat (4) @(posedge clk40);
    check(pll_rst, "PLL reset on link loss");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk240_rec);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
