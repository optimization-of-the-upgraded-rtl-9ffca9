// tb_si5345_model: self-checking test of the Si5345 model.
//
// Feeds a 240 MHz clock and checks: lock after reset; four outputs at the
// input period; each output's phase against the input lies within the
// configured skew and is steady; one 72 ps step moves exactly the selected
// output; and an input that moves moves all four outputs with it.
module tb_si5345_model;
  timeunit 1ps; timeprecision 1ps;

  localparam int T = 4160;

  logic in_clk = 1'b0, rst, locked, ps_req, ps_up, ps_ack;
  logic [1:0] ps_sel;
  logic [3:0] out_clk;
  int checks = 0, failures = 0;
  int in_shift = 0;           // extra input delay applied by the test
  logic src = 1'b0;
  time t_in;
  time t_out [4];
  time t_prev [4];

  always #(T/2) src = ~src;
  always @(posedge src) begin
    in_clk <= #(T + in_shift)         1'b1;
    in_clk <= #(T + in_shift + T / 2) 1'b0;
  end

  si5345_model dut (.*);

  always @(posedge src) t_in = $time;   // phase reference: undelayed source
  for (genvar i = 0; i < 4; i++) begin : g_mon
    always @(posedge out_clk[i]) begin
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

  task automatic settle(output int ph [4]);
    int p0 [4];
    repeat (6) @(posedge src);
    @(negedge src);
    for (int i = 0; i < 4; i++) begin
      p0[i] = int'((t_out[i] - t_in) % T);
      check(t_out[i] - t_prev[i] == T, $sformatf("period out%0d", i));
    end
    @(negedge src);
    for (int i = 0; i < 4; i++) begin
      ph[i] = int'((t_out[i] - t_in) % T);
      check(ph[i] == p0[i], $sformatf("steady out%0d", i));
    end
  endtask

  task automatic step(input int sel, input bit up);
    ps_sel = 2'(sel); ps_up = up; ps_req = 1'b1;
    wait (ps_ack);
    ps_req = 1'b0;
    wait (!ps_ack);
    checks++;
  endtask

  initial begin
    int ph [4], ph2 [4];
    rst = 1'b1; ps_req = 1'b0; ps_up = 1'b0; ps_sel = '0;
    t_in = 0; t_out = '{default: 0}; t_prev = '{default: 0};
    repeat (4) @(posedge src);
    rst = 1'b0;
    repeat (24) @(posedge src);
    check(locked, "locked");
    settle(ph);
    // input at T+in_shift behind src, output DELAY_PS=T plus skew behind input
    for (int i = 0; i < 4; i++)
      check(ph[i] >= 0 && ph[i] <= 500, $sformatf("skew out%0d = %0d", i, ph[i]));
    step(2, 1'b1);
    settle(ph2);
    for (int i = 0; i < 4; i++)
      check(ph2[i] == ((i == 2) ? ph[i] + 72 : ph[i]), $sformatf("step on out2, out%0d", i));
    step(0, 1'b1); step(0, 1'b1); step(0, 1'b0);
    settle(ph);
    check(ph[0] == ph2[0] + 72, "net one step on out0");
    // moving the input moves every output
    in_shift = 104;
    settle(ph2);
    for (int i = 0; i < 4; i++)
      check(ph2[i] == ph[i] + 104, $sformatf("input shift reaches out%0d", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge src);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
