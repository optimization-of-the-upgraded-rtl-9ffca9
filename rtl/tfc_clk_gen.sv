// tfc_clk_gen: 40 MHz TFC system clock from the 240 MHz recovered clock.
//
// The TTC-PON receiver recovers a 240 MHz parallel clock and marks the frame
// header with a one-cycle strobe, once every six cycles. This block divides
// the 240 MHz clock by six with a counter that the strobe resets, so the
// 40 MHz output keeps a fixed phase to the header and therefore to the LHC
// bunch clock. That principle (a strobe aligned with the header, used by the
// firmware to build a 40 MHz clock in phase with the bunch clock) is the
// document's; the counter, the duty cycle and the alignment monitor are this
// design's own.
//
// Timing: the 240 MHz edge that samples hdr_strobe high loads phase 0 and
// drives clk40 high, so clk40 rises one clock-to-out after that edge and is
// high for three 240 MHz cycles, low for three. A strobe seen at any other
// phase restarts the counter there and counts one realignment. 'aligned'
// rises after ALIGN_CONFIRM strobes in a row arrive where expected and falls
// on a misplaced strobe, a missing strobe or when rx_ready drops.
module tfc_clk_gen #(
  parameter int unsigned DIV           = 6,  // 240 MHz / 40 MHz
  parameter int unsigned ALIGN_CONFIRM = 4   // good strobes before 'aligned'
) (
  input  logic        clk240,       // recovered parallel clock
  input  logic        rst,          // synchronous, active high
  input  logic        rx_ready,     // receiver link locked
  input  logic        hdr_strobe,   // header strobe, one cycle per frame
  output logic        clk40,        // 40 MHz system clock (register output)
  output logic [2:0]  phase,        // 240 MHz cycle inside the 40 MHz period
  output logic        aligned,
  output logic [15:0] realign_cnt   // strobes found out of place
);
  timeunit 1ps; timeprecision 1ps;

  logic [2:0] cnt;
  logic [2:0] cnt_next;
  logic [$clog2(ALIGN_CONFIRM+1)-1:0] good;
  logic       strobe_expected;

  assign cnt_next        = (cnt == 3'(DIV - 1)) ? 3'd0 : cnt + 3'd1;
  assign strobe_expected = (cnt_next == 3'd0);

  always_ff @(posedge clk240) begin
    if (rst) begin
      cnt         <= 3'(DIV - 1);
      clk40       <= 1'b0;
      aligned     <= 1'b0;
      good        <= '0;
      realign_cnt <= '0;
    end else begin
      if (hdr_strobe) cnt <= 3'd0;
      else            cnt <= cnt_next;

      // high during phases 0..DIV/2-1
      clk40 <= hdr_strobe ? 1'b1 : (cnt_next < 3'(DIV / 2));

      if (!rx_ready) begin
        aligned <= 1'b0;
        good    <= '0;
      end else if (hdr_strobe && !strobe_expected) begin
        aligned     <= 1'b0;
        good        <= '0;
        realign_cnt <= realign_cnt + 16'd1;
      end else if (!hdr_strobe && strobe_expected) begin
        aligned <= 1'b0;  // header missing where it was due
        good    <= '0;
      end else if (hdr_strobe) begin
        if (good == ($bits(good))'(ALIGN_CONFIRM - 1)) aligned <= 1'b1;
        else                                            good <= good + 1'b1;
      end
    end
  end

  assign phase = cnt;

endmodule
