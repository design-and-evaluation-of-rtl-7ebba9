// auto_select: drives the multiplexer's SELECT, either from the remote
// (manual) select line or automatically, giving priority to the peaking strip
// clock whenever it is present.
//
// The peaking strip clock is synchronised to the reference clock and a counter
// measures the time since its last rising edge. The clock counts as present
// once two rising edges arrive less than TIMEOUT_CYCLES apart, and as missing
// once TIMEOUT_CYCLES pass without one (150 ms, one and a half 10 Hz periods,
// by default). With auto_en high, select_out follows ps_present; with auto_en
// low it follows select_manual.
//
// The published mux can only leave a clock that is still running, so in
// automatic mode clr1_n is held low while the peaking strip is missing: that
// clears the peaking strip enable path and lets the PG&E path take over at
// once. clr1_n is also low during reset. All outputs are registered in the
// reference clock domain.
//
// Self-switching with peaking strip priority is what the timing system asks
// for. The edge-timeout detector, its 150 ms timeout, the two-edge rule and
// the path clear are this design's own choices.
module auto_select #(
  parameter int unsigned TIMEOUT_CYCLES =
      timing_pkg::ms_to_cycles(timing_pkg::REF_HZ, timing_pkg::PS_TIMEOUT_MS)
) (
  input  logic clk,           // reference clock
  input  logic rst_n,         // asynchronous reset, active low
  input  logic ps_clk,        // peaking strip clock (asynchronous)
  input  logic auto_en,       // 1 = automatic select, 0 = manual select
  input  logic select_manual, // remote select: 0 = PG&E, 1 = peaking strip
  output logic select_out,    // to the mux SELECT
  output logic clr1_n,        // to the mux peaking strip path clear
  output logic ps_present     // peaking strip clock detected
);
  localparam int unsigned CW = $clog2(TIMEOUT_CYCLES + 1);

  logic          ps_s, ps_q, ps_rise;
  logic [CW-1:0] since_edge;  // cycles since the last rising edge, saturating

  sync2 u_sync (.clk(clk), .rst_n(rst_n), .d(ps_clk), .q(ps_s));

  assign ps_rise = ps_s & ~ps_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      ps_q       <= 1'b0;
      since_edge <= CW'(TIMEOUT_CYCLES);
      ps_present <= 1'b0;
      select_out <= 1'b0;
      clr1_n     <= 1'b0;
    end else begin
      ps_q <= ps_s;
      if (ps_rise) begin
        since_edge <= '0;
        if (since_edge < CW'(TIMEOUT_CYCLES)) ps_present <= 1'b1;
      end else if (since_edge < CW'(TIMEOUT_CYCLES)) begin
        since_edge <= since_edge + 1'b1;
      end else begin
        ps_present <= 1'b0;
      end
      select_out <= auto_en ? ps_present : select_manual;
      clr1_n     <= !(auto_en && !ps_present);
    end
endmodule
