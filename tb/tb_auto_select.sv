// tb_auto_select: checks the peaking strip detector and the select logic.
//
// A short copy (timeout 100 cycles) is driven through: a peaking strip clock
// with a period inside the timeout, its loss, a clock slower than the timeout,
// and manual/automatic mode changes. A default copy (150 ms at 1 MHz) sees a
// 10 Hz peaking strip that then stops. The bench keeps its own record of the
// time of each rising edge it drives and checks that:
//  * ps_present rises within 4 cycles of the second edge that follows the
//    previous one by less than the timeout, and not before it;
//  * ps_present stays high while edges keep coming, and falls within
//    TIMEOUT + 4 cycles of the last edge, not before TIMEOUT;
//  * a clock slower than the timeout is never reported present;
//  * one cycle after each edge, select_out equals the value computed from
//    auto_en, select_manual and ps_present, and clr1_n equals
//    !(auto_en && !ps_present) (both are 0 in reset).
`timescale 1ns/1ps
module tb_auto_select;
  localparam int unsigned TO = 100;
  logic clk = 0, rst_n = 0;
  // reset from time 0, with a falling edge at 1 ns so that it takes effect
  initial begin #0.5 rst_n = 1; #0.5 rst_n = 0; end
  logic ps = 0, ps_d = 0, auto_en = 0, sel_man = 0;
  logic sel_s, clr_s, pres_s, sel_d, clr_d, pres_d;
  int checks = 0, failures = 0, cycle = 0;
  int present_events = 0, lost_events = 0;

  auto_select #(.TIMEOUT_CYCLES(TO)) u_s (
    .clk(clk), .rst_n(rst_n), .ps_clk(ps), .auto_en(auto_en), .select_manual(sel_man),
    .select_out(sel_s), .clr1_n(clr_s), .ps_present(pres_s));
  auto_select u_d (
    .clk(clk), .rst_n(rst_n), .ps_clk(ps_d), .auto_en(1'b1), .select_manual(1'b0),
    .select_out(sel_d), .clr1_n(clr_d), .ps_present(pres_d));

  always #500 clk = ~clk;
  always @(posedge clk) cycle++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL at cycle %0d: %s", cycle, what);
    end
  endtask

  // select_out / clr1_n follow their inputs with one cycle of delay
  logic exp_sel, exp_clr;
  always @(posedge clk) begin
    exp_sel = auto_en ? pres_s : sel_man;
    exp_clr = !(auto_en && !pres_s);
    if (!rst_n) begin exp_sel = 0; exp_clr = 0; end
    #1;
    check(sel_s == exp_sel, "select_out");
    check(clr_s == exp_clr, "clr1_n");
  end

  always @(posedge pres_s) if (rst_n) present_events++;
  always @(negedge pres_s) if (rst_n) lost_events++;

  // one peaking strip pulse of 'hi' cycles, then 'lo' low cycles
  task automatic pulse(ref logic sig, input int hi, input int lo);
    @(negedge clk); sig = 1;
    repeat (hi) @(negedge clk);
    sig = 0;
    repeat (lo) @(negedge clk);
  endtask

  task automatic wait_cycles(input int n);
    repeat (n) @(negedge clk);
  endtask

  int t0;
  initial begin
    #2200 rst_n = 1;
    wait_cycles(3);
    check(!pres_s && !pres_d, "not present after reset");

    // manual mode, clock runs with period 60 < TO
    sel_man = 1;
    pulse(ps, 5, 55);
    check(!pres_s, "one edge is not enough");
    @(negedge clk); ps = 1; t0 = cycle;
    wait_cycles(2);
    check(!pres_s, "present too early");
    wait_cycles(3); ps = 0;
    check(pres_s, "present after second edge");
    wait_cycles(50);
    repeat (10) pulse(ps, 10, 50);
    check(pres_s, "stays present while running");

    // automatic mode, then the clock stops
    auto_en = 1;
    wait_cycles(TO - 70);
    check(pres_s, "present until timeout");
    wait_cycles(TO - (TO - 70) - 60 + 8);
    check(!pres_s, "missing after timeout");

    // slower than the timeout: never present
    repeat (5) pulse(ps, 10, TO + 20);
    check(!pres_s && present_events == 1, "slow clock is not present");

    // comes back, then manual mode again
    repeat (4) pulse(ps, 20, 40);
    check(pres_s, "present again");
    auto_en = 0; sel_man = 0;
    repeat (4) pulse(ps, 20, 40);
    sel_man = 1;
    wait_cycles(TO + 10);
    check(!pres_s && lost_events == 2, "lost again");

    // default size: 10 Hz peaking strip (100000 cycles), then stops
    repeat (3) pulse(ps_d, 5000, 95000);
    check(pres_d && sel_d && clr_d, "default: 10 Hz peaking strip present");
    wait_cycles(150000 - 100000 - 20);
    check(pres_d, "default: still present just before 150 ms");
    wait_cycles(30);
    check(!pres_d && !sel_d && !clr_d, "default: missing after 150 ms");

    $display("present_events=%0d lost_events=%0d", present_events, lost_events);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
