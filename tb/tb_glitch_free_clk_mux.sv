// tb_glitch_free_clk_mux: self-checking test of the glitch-free clock mux.
//
// Two free-running clocks of unrelated period and pulse width drive clk0 and
// clk1 while select toggles at random times. Independent of the mux's
// structure, the bench checks:
//  * no runt pulse: every high pulse on clk_out lasts exactly one high phase
//    of clk0 or clk1, and every low gap is at least the shorter low phase;
//  * steady state: once a switch has had time to finish (one period of the
//    old clock plus two of the new one), clk_out equals the selected clock;
//  * the enables are never on together;
//  * a stopped clock blocks the switch (clk_out stays low), and clearing the
//    stopped path lets the other clock through.
// Runs use wide clocks of different rates and narrow pulse trains of nearly
// the same rate, like the two 10 Hz trigger sources; time is scaled to ns.
`timescale 1ns/1ps
module tb_glitch_free_clk_mux;
  logic clk0 = 0, clk1 = 0, select = 0, clr0_n = 0, clr1_n = 0;
  // clears from time 0, with a falling edge at 1 ns so that they take effect
  initial begin #0.5 {clr0_n, clr1_n} = 2'b11; #0.5 {clr0_n, clr1_n} = 2'b00; end
  logic clk_out, en0, en1;
  int checks = 0, failures = 0, switches = 0, lost_pulses = 0;

  realtime h0 = 50, l0 = 50, h1 = 12, l1 = 25;  // high/low phases
  bit run0 = 1, run1 = 1;

  glitch_free_clk_mux dut (.*);

  always begin
    if (run0) begin clk0 = 1; #(h0); clk0 = 0; #(l0); end else #1;
  end
  always begin
    #3.3;
    forever if (run1) begin clk1 = 1; #(h1); clk1 = 0; #(l1); end else #1;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL at %0t: %s", $realtime, what);
    end
  endtask

  // ---- glitch monitor ----
  realtime t_rise = -1, t_fall = -1;
  bit mon_en = 0;
  always @(clk_out) if (mon_en) begin
    if (clk_out) begin
      if (t_fall >= 0)
        check($realtime - t_fall >= ((l0 < l1) ? l0 : l1) - 0.001,
              $sformatf("short low gap %0t", $realtime - t_fall));
      t_rise = $realtime;
    end else begin
      if (t_rise >= 0) begin
        realtime w;
        w = $realtime - t_rise;
        check((w > h0 - 0.001 && w < h0 + 0.001) || (w > h1 - 0.001 && w < h1 + 0.001),
              $sformatf("runt/odd high pulse %0t", w));
      end
      t_fall = $realtime;
    end
  end

  always @(posedge clk0 or posedge clk1)
    if (mon_en) check(!(en0 && en1), "both enables on");

  // Compares clk_out with the selected clock 50 ps after every change of
  // either clock or of clk_out, for dur ns.
  task automatic follow(input realtime dur);
    realtime t_end;
    int bad;
    t_end = $realtime + dur;
    bad = 0;
    while ($realtime < t_end) begin
      @(clk0 or clk1 or clk_out);
      #0.05;
      if (clk_out !== (select ? clk1 : clk0)) bad++;
    end
    check(bad == 0, $sformatf("clk_out does not follow clk%0d (%0d samples)", select, bad));
  endtask

  // Toggles select and allows the switch its bound before checking.
  task automatic toggle_and_check(input realtime hold);
    // bound: the old clock's next rising then falling edge, then the new
    // clock's next rising then falling edge
    realtime t_old, h_old, t_new, h_new, bound;
    int new_pulses, old_edges;
    t_old = select ? h1 + l1 : h0 + l0;
    h_old = select ? h1 : h0;
    t_new = select ? h0 + l0 : h1 + l1;
    h_new = select ? h0 : h1;
    bound = t_old + h_old + t_new + h_new + 0.1;
    new_pulses = 0;
    select = !select;
    switches++;
    fork
      begin : cnt
        forever @(posedge clk_out) new_pulses++;
      end
      #(bound);
    join_any
    disable fork;
    // pulses of the new clock in the bound window that did not appear
    old_edges = int'(bound / t_new);
    if (old_edges > new_pulses) lost_pulses += old_edges - new_pulses;
    follow(hold);
  endtask

  initial begin
    // reset: both paths clear, then released; clk0 must appear
    #20 clr0_n = 1; clr1_n = 1;
    mon_en = 1;
    #(2 * (h0 + l0) + 0.1);
    follow(500);
    check(en0 && !en1, "after reset clk0 path should be enabled");

    // different rates, wide pulses, random switching instants
    repeat (12) begin
      #($urandom_range(0, 97) + 0.25);
      toggle_and_check(300 + $urandom_range(0, 200));
    end

    // similar rates, narrow pulse trains (scaled 10 Hz triggers)
    @(negedge clk_out);
    mon_en = 0;
    h0 = 5; l0 = 95; h1 = 7; l1 = 96;
    #1000;
    t_rise = -1; t_fall = -1; mon_en = 1;
    repeat (8) begin
      #($urandom_range(0, 150) + 0.25);
      toggle_and_check(700);
    end

    // stopped clock: clk1 selected, then clk1 stops low and select goes 0
    if (!select) toggle_and_check(500);
    wait (!clk1);
    run1 = 0;
    #1 select = 0;
    #2000;
    check(clk_out == 0 && !en0, "switch away from a stopped clock must stall");
    check(en1, "stopped path keeps its enable until cleared");
    // clear the stopped path; clk0 must now come through
    clr1_n = 0; #2 clr1_n = 1;
    #(2 * (h0 + l0) + 0.1);
    follow(500);
    check(en0 && !en1, "clk0 enabled after clearing stopped path");

    $display("switches=%0d lost_pulses(approx)=%0d", switches, lost_pulses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
