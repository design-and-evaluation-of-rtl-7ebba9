// tb_switch_pulse_loss: bench test of the glitch-free clock mux with two
// independent pulse generators, over a range of rates and pulse widths,
// including two 10 Hz trigger trains in real time.
//
// For each pair of clocks the select line is toggled at random instants.
// Around every switch the bench counts, from its own record of the source
// edges:
//  * old pulses that start after the select change and still reach the
//    output: exactly one (the old clock stops after its next pulse);
//  * new-clock pulses that start between the last old output pulse and the
//    first new output pulse: exactly one. This is the single missing pulse
//    per switch that the circuit shows on the bench.
// Every output pulse must be a whole source pulse (no runt). The test uses
// narrow pulses (high time below half the period) as the triggers are.
`timescale 1ns/1ps
module tb_switch_pulse_loss;
  localparam realtime MS = 1_000_000.0;
  logic clk0 = 0, clk1 = 0, select = 0, clr0_n = 0, clr1_n = 0;
  // clears from time 0, with a falling edge at 1 ns so that they take effect
  initial begin #0.5 {clr0_n, clr1_n} = 2'b11; #0.5 {clr0_n, clr1_n} = 2'b00; end
  logic clk_out, en0, en1;
  int checks = 0, failures = 0, switches = 0;

  realtime t0 = 100 * MS, w0 = 2 * MS, t1 = 100.003 * MS, w1 = 2 * MS;

  glitch_free_clk_mux dut (.*);

  always begin clk0 = 1; #(w0); clk0 = 0; #(t0 - w0); end
  always begin #(37.1 * MS / 100.0); forever begin clk1 = 1; #(w1); clk1 = 0; #(t1 - w1); end end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL at %0.4f ms: %s", $realtime / MS, what);
    end
  endtask

  // pulse-width monitor
  int old_passed, new_between;
  realtime out_rise;
  bit mon = 0;  // off while the generators change settings
  always @(posedge clk_out) out_rise = $realtime;
  always @(negedge clk_out) if (mon) begin
    realtime w;
    w = $realtime - out_rise;
    check((w > w0 - 0.001 && w < w0 + 0.001) || (w > w1 - 0.001 && w < w1 + 0.001), "runt pulse");
  end

  task automatic one_switch();
    realtime told;
    old_passed = 0; new_between = 0;
    told = select ? t1 : t0;
    // switch while the old clock is low, so no old pulse is in progress
    wait (!(select ? clk1 : clk0));
    #0.01;
    select = !select;
    switches++;
    // old clock: count its pulses that still pass, until its enable drops
    while (select ? en0 : en1) begin
      @(posedge clk_out or negedge (select ? en0 : en1));
      if (clk_out) old_passed++;
    end
    wait (!clk_out);
    // new clock: count its pulses that start before the first one that
    // reaches the output
    forever begin
      if (select) @(posedge clk1); else @(posedge clk0);
      #0.001;
      if (clk_out) break;
      new_between++;
    end
    check(old_passed == 1, $sformatf("old pulses after select change: %0d, want 1", old_passed));
    check(new_between == 1, $sformatf("new pulses lost: %0d, want 1", new_between));
    #(($urandom_range(0, 1000) / 1000.0) * told);
  endtask

  task automatic run_pair(input realtime a_t, a_w, b_t, b_w, input int n);
    realtime settle;
    // the generators finish their current period with the old settings
    settle = 2 * (t0 + t1 + a_t + b_t);
    mon = 0;
    t0 = a_t; w0 = a_w; t1 = b_t; w1 = b_w;
    #(settle);
    mon = 1;
    repeat (n) one_switch();
    $display("pair T0=%0.4f ms w0=%0.4f ms T1=%0.4f ms w1=%0.4f ms: %0d switches",
             t0 / MS, w0 / MS, t1 / MS, w1 / MS, n);
  endtask

  initial begin
    #(1 * MS) clr0_n = 1; clr1_n = 1;
    run_pair(100 * MS, 2 * MS, 100.003 * MS, 2 * MS, 10);       // PG&E and peaking strip, 10 Hz
    run_pair(100 * MS, 30 * MS, 100 * MS, 5 * MS, 6);           // same rate, different widths
    run_pair(16.7 * MS, 4 * MS, 100 * MS, 5 * MS, 6);           // 60 Hz against 10 Hz
    run_pair(1 * MS, 0.1 * MS, 0.37 * MS, 0.05 * MS, 20);       // kHz range
    run_pair(0.001 * MS, 0.0004 * MS, 0.0137 * MS, 0.002 * MS, 20); // MHz against 73 kHz
    $display("switches=%0d", switches);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(30_000 * MS);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
