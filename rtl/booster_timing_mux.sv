// booster_timing_mux: one 10 Hz LINAC trigger channel of the booster timing
// system. It passes either the PG&E-derived 10 Hz clock or the booster's
// peaking strip 10 Hz clock to the LINAC trigger output, switching between
// them without glitches.
//
//   line_clk (60 Hz) -> line_clock_divider -> pge_10hz --+-> [edge_delay 40 ms] -+
//                                                         +----------------------+-> CLK0 \
//   ps_clk ---------------------------------------------------------------------> CLK1  mux -> linac_trig
//   select, auto_en -> auto_select ------------------------------------------> SELECT /
//
// With auto_en low the remote select line chooses the source, as in the
// prototype: 0 = PG&E, 1 = peaking strip. Here the mux behaves exactly like
// the published circuit, so it cannot leave the peaking strip once that clock
// has stopped. With auto_en high the channel switches by itself: the peaking
// strip whenever it is running, PG&E when it is missing. pge_delay_en routes
// the PG&E clock through a 40 ms delay before the mux, as the existing timing
// system does; the peaking strip path is always prompt.
//
// auto_en and pge_delay_en are static settings. The path selected by
// pge_delay_en feeds a clock input, so change it only while the peaking strip
// is selected or during reset. ref_clk times the delay and the missing-clock
// detector (1 MHz by default); the trigger path itself does not depend on it
// and its rising edges come straight from the chosen input.
//
// The glitch-free mux is the published circuit. The divider, the delay and
// the automatic select are built from what the timing system needs, and their
// insides are this design's own. Reset, ref_clk and the two setting pins are
// also this design's own.
module booster_timing_mux #(
  parameter int unsigned REF_HZ        = timing_pkg::REF_HZ,
  parameter int unsigned LINE_DIV      = timing_pkg::LINE_HZ / timing_pkg::TRIG_HZ,
  parameter int unsigned PGE_DELAY_MS  = timing_pkg::PGE_DELAY_MS,
  parameter int unsigned PS_TIMEOUT_MS = timing_pkg::PS_TIMEOUT_MS
) (
  input  logic ref_clk,      // reference clock for delay and detector
  input  logic rst_n,        // asynchronous reset, active low
  input  logic line_clk,     // 60 Hz power line clock
  input  logic ps_clk,       // 10 Hz peaking strip clock
  input  logic select,       // remote select: 0 = PG&E, 1 = peaking strip
  input  logic auto_en,      // 1 = select automatically
  input  logic pge_delay_en, // 1 = delay the PG&E clock by PGE_DELAY_MS
  output logic linac_trig,   // multiplexed 10 Hz trigger
  output logic pge_10hz,     // 10 Hz clock derived from the line
  output logic select_eff,   // SELECT as applied to the mux
  output logic ps_present,   // peaking strip clock detected
  output logic pge_active,   // PG&E path gated through
  output logic ps_active     // peaking strip path gated through
);
  logic pge_delayed, clk0, clr1_n;

  line_clock_divider #(.DIV(LINE_DIV)) u_div (
    .line_clk(line_clk), .rst_n(rst_n), .clk_out(pge_10hz));

  edge_delay #(.DELAY_CYCLES(timing_pkg::ms_to_cycles(REF_HZ, PGE_DELAY_MS))) u_delay (
    .clk(ref_clk), .rst_n(rst_n), .din(pge_10hz), .dout(pge_delayed));

  assign clk0 = pge_delay_en ? pge_delayed : pge_10hz;

  auto_select #(.TIMEOUT_CYCLES(timing_pkg::ms_to_cycles(REF_HZ, PS_TIMEOUT_MS))) u_sel (
    .clk(ref_clk), .rst_n(rst_n), .ps_clk(ps_clk), .auto_en(auto_en),
    .select_manual(select), .select_out(select_eff), .clr1_n(clr1_n),
    .ps_present(ps_present));

  glitch_free_clk_mux u_mux (
    .clk0(clk0), .clk1(ps_clk), .select(select_eff),
    .clr0_n(rst_n), .clr1_n(clr1_n),
    .clk_out(linac_trig), .en0(pge_active), .en1(ps_active));
endmodule
