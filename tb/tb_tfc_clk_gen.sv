// tb_tfc_clk_gen: self-checking test of the 40 MHz clock generator.
//
// Drives a 240 MHz clock and a header strobe every six cycles, then moves
// the strobe, drops it and drops rx_ready. A reference model (cycles since
// the last strobe, modulo six) gives the expected phase and clk40 after each
// rising edge; the test also checks that clk40 rises on the very edge that
// samples the strobe (zero cycles of latency), the alignment flag and the
// count of realignments.
module tb_tfc_clk_gen;
  timeunit 1ps; timeprecision 1ps;

  logic clk240 = 1'b0, rst, rx_ready, hdr_strobe;
  logic clk40, aligned;
  logic [2:0]  phase;
  logic [15:0] realign_cnt;
  int checks = 0, failures = 0;

  always #2080 clk240 = ~clk240;

  tfc_clk_gen dut (.*);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", msg, $time);
    end
  endtask

  // reference model state, updated at each rising edge
  int since = 0;       // cycles since last strobe (reset loads 5, one edge passes)
  int exp_realign = 0;

  // drive 'n' frames with the strobe at cycle 'pos' of each frame; 'gap'
  // frames have no strobe
  task automatic run_frames(input int n, input int pos, input bit present = 1);
    for (int f = 0; f < n; f++)
      for (int c = 0; c < 6; c++) begin
        @(negedge clk240);
        hdr_strobe = present && (c == pos);
        @(posedge clk240);
        #1;
        if (hdr_strobe) begin
          if (since >= 0 && (since + 1) % 6 != 0) exp_realign++;
          since = 0;
          check(clk40 == 1'b1, "clk40 high on strobe edge");
        end else if (since >= 0) since++;
        if (since >= 0) begin
          check(phase == 3'(since % 6), "phase");
          check(clk40 == ((since % 6) < 3), "clk40 level");
        end
        check(realign_cnt == 16'(exp_realign), "realign count");
      end
  endtask

  initial begin
    rst = 1'b1; rx_ready = 1'b0; hdr_strobe = 1'b0;
    repeat (4) @(posedge clk240);
    @(negedge clk240); rst = 1'b0; rx_ready = 1'b1;
    // first strobe lands wherever: may count one realignment
    run_frames(6, 2);
    check(aligned == 1'b1, "aligned after good strobes");
    // header moves by one cycle: realign
    run_frames(1, 3);
    check(aligned == 1'b0, "not aligned right after a moved strobe");
    run_frames(6, 3);
    check(aligned == 1'b1, "aligned again");
    check(realign_cnt >= 16'd1, "realignment counted");
    // header missing for a frame: counter free-runs, flag drops
    run_frames(1, 3, 1'b0);
    check(aligned == 1'b0, "missing strobe clears aligned");
    run_frames(6, 3);
    check(aligned == 1'b1, "aligned after missing strobe");
    // link down
    rx_ready = 1'b0;
    run_frames(1, 3);
    check(aligned == 1'b0, "rx_ready low clears aligned");
    rx_ready = 1'b1;
    run_frames(6, 3);
    check(aligned == 1'b1, "aligned after link returns");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk240);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
