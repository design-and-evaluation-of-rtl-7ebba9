// tb_booster_timing_mux: end-to-end test of one LINAC trigger channel at its
// default sizes (1 MHz reference, 60 Hz line, 40 ms PG&E delay, 150 ms
// peaking strip timeout), over about 8 s of machine time.
//
// The bench drives a 60 Hz line clock and a 10 Hz peaking strip clock (2 ms
// pulses, slightly off 10 Hz so the two sources drift against each other).
// Every rising edge of linac_trig is classified by its own timing record of
// the sources: a peaking strip pulse (a peaking strip rising edge at the same
// instant), a prompt PG&E pulse (a PG&E 10 Hz rising edge at the same
// instant) or a delayed PG&E pulse (a PG&E rising edge 40 ms +-2 us before).
// Anything else is a glitch. Every high pulse must also last a whole source
// pulse (2 ms, or 50 ms +-2 us). Each phase below must produce only the
// expected kind of pulse, and enough of them:
//   1 manual, select 0, no delay     -> prompt PG&E
//   2 manual, select 1               -> peaking strip (delay switched on here)
//   3 manual, select 0, delay        -> delayed PG&E
//   4 manual, peaking strip stops while selected, select 0 -> stall, no pulses
//   5 automatic                      -> falls back to delayed PG&E
//   6 peaking strip returns          -> peaking strip
//   7 peaking strip stops            -> falls back to delayed PG&E
// The bench also checks the PG&E clock is line/6 (100 ms period) and counts
// each mechanism: manual switch, delay, stall, automatic fallback, automatic
// return to the peaking strip. One that never happens is a failure.
`timescale 1ns/1ps
module tb_booster_timing_mux;
  localparam realtime MS        = 1_000_000.0;  // ns
  localparam realtime LINE_HALF = 1.0e9 / 60.0 / 2.0;
  localparam realtime PS_PER    = 100.003 * MS;
  localparam realtime PS_HI     = 2.0 * MS;
  localparam realtime TOL       = 2_000.0;      // 2 us

  logic ref_clk = 0, rst_n = 0, line_clk = 0, ps_clk = 0;
  // reset from time 0, with a falling edge at 1 ns so that it takes effect
  initial begin #0.5 rst_n = 1; #0.5 rst_n = 0; end
  logic select = 0, auto_en = 0, pge_delay_en = 0;
  logic linac_trig, pge_10hz, select_eff, ps_present, pge_active, ps_active;

  booster_timing_mux dut (.*);

  int checks = 0, failures = 0;
  bit ps_run = 1;

  always #500 ref_clk = ~ref_clk;
  always #(LINE_HALF) line_clk = ~line_clk;
  initial begin
    #(7.3 * MS);
    forever begin
      if (ps_run) begin ps_clk = 1; #(PS_HI); ps_clk = 0; #(PS_PER - PS_HI); end
      else #(1 * MS);
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL at %0.3f ms: %s", $realtime / MS, what);
    end
  endtask

  // ---- source timing records ----
  realtime pge_rises[$];
  realtime last_ps_rise = -1, last_pge_rise = -1;
  always @(posedge ps_clk) last_ps_rise = $realtime;
  always @(posedge pge_10hz) begin
    if (last_pge_rise >= 0 && rst_n)
      check($realtime - last_pge_rise > 100 * MS - 1 && $realtime - last_pge_rise < 100 * MS + 1,
            "PG&E 10 Hz period is not 6 line periods");
    last_pge_rise = $realtime;
    pge_rises.push_back($realtime);
    if (pge_rises.size() > 4) void'(pge_rises.pop_front());
  end

  // ---- classification of the trigger output ----
  typedef enum int {K_NONE, K_PS, K_PGE, K_PGE_DLY} kind_e;
  int n_kind[4];
  kind_e cur_kind = K_NONE;
  realtime t_trig_rise = -1;
  bit live = 0;  // set when reset is released
  always @(posedge linac_trig) if (live) begin
    kind_e k;
    t_trig_rise = $realtime;
    #1;
    k = K_NONE;
    if (last_ps_rise == t_trig_rise) k = K_PS;
    else if (last_pge_rise == t_trig_rise) k = K_PGE;
    else foreach (pge_rises[i])
      if (t_trig_rise - pge_rises[i] > 40 * MS - TOL && t_trig_rise - pge_rises[i] < 40 * MS + TOL)
        k = K_PGE_DLY;
    check(k != K_NONE, "trigger edge matches no source edge (glitch)");
    cur_kind = k;
    n_kind[k]++;
  end
  always @(negedge linac_trig) if (live && t_trig_rise > 0) begin
    realtime w;
    w = $realtime - t_trig_rise;
    if (cur_kind == K_PS) check(w == PS_HI, "peaking strip pulse cut");
    else check(w > 50 * MS - TOL && w < 50 * MS + TOL, $sformatf("PG&E pulse %0.3f ms", w / MS));
  end

  // Runs a phase of dur ms and checks that only pulses of kind k appeared,
  // at least min_n of them.
  task automatic phase(input string name, input realtime dur, input kind_e k, input int min_n);
    int n_start[4];
    int got, other;
    n_start = n_kind;
    #(dur * MS);
    got = n_kind[k] - n_start[k];
    other = 0;
    for (int i = 0; i < 4; i++) if (i != int'(k)) other += n_kind[i] - n_start[i];
    check(got >= min_n, $sformatf("%s: %0d pulses of kind %s, want >= %0d", name, got, k.name(), min_n));
    check(other == 0, $sformatf("%s: %0d pulses of another kind", name, other));
    $display("%-28s %0d pulses (%s)", name, got, k.name());
  endtask

  int n_manual_switch = 0, n_delay = 0, n_stall = 0, n_auto_fallback = 0, n_auto_return = 0;

  initial begin
    #(20 * MS) rst_n = 1;
    live = 1;
    #(300 * MS);  // let the first switch-on settle
    phase("1 manual PG&E prompt", 1000, K_PGE, 9);

    select = 1; n_manual_switch++;
    #(300 * MS);
    pge_delay_en = 1;
    phase("2 manual peaking strip", 1000, K_PS, 9);

    select = 0; n_manual_switch++;
    #(300 * MS);
    phase("3 manual PG&E delayed", 1000, K_PGE_DLY, 9);
    n_delay += n_kind[K_PGE_DLY];

    select = 1; n_manual_switch++;
    #(400 * MS);
    wait (!ps_clk);
    ps_run = 0;
    #(10 * MS) select = 0;
    #(1 * MS);
    phase("4 stopped source stalls", 1000, K_NONE, 0);
    check(!pge_active && ps_active, "stall: peaking strip path still holds the output");
    if (!pge_active) n_stall++;

    auto_en = 1;
    #(300 * MS);
    check(!ps_present && !select_eff && pge_active, "automatic fallback to PG&E");
    if (pge_active) n_auto_fallback++;
    phase("5 auto, no peaking strip", 1000, K_PGE_DLY, 9);

    ps_run = 1;
    #(400 * MS);
    check(ps_present && select_eff && ps_active, "automatic return to peaking strip");
    if (ps_active) n_auto_return++;
    phase("6 auto, peaking strip on", 1000, K_PS, 9);

    wait (!ps_clk);
    ps_run = 0;
    #(400 * MS);
    check(!ps_present && pge_active, "automatic fallback after loss");
    if (pge_active) n_auto_fallback++;
    phase("7 auto, peaking strip lost", 1000, K_PGE_DLY, 9);

    $display("mechanisms: manual_switch=%0d delay=%0d stall=%0d auto_fallback=%0d auto_return=%0d",
             n_manual_switch, n_delay, n_stall, n_auto_fallback, n_auto_return);
    check(n_manual_switch > 0, "manual switch never happened");
    check(n_delay > 0, "40 ms delay never applied");
    check(n_stall > 0, "stall never seen");
    check(n_auto_fallback > 0, "automatic fallback never happened");
    check(n_auto_return > 0, "automatic return never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(12_000 * MS);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
