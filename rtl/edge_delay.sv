// edge_delay: delays a slow pulse train (the 10 Hz PG&E clock) by a fixed
// number of reference clock cycles, keeping its pulse width.
//
// The input is synchronised to clk. Its rising and falling edges each start a
// down-counter of their own; when a counter runs out the output takes the new
// level. Both edges are therefore moved by exactly DELAY_CYCLES cycles of clk,
// measured from the clk edge that first samples the input change, and the
// output is a registered, glitch-free level. Each edge timer holds one pending
// edge, so consecutive rising edges, and consecutive falling edges, must be
// more than the delay apart (100 ms against 40 ms for the 10 Hz clock).
// An input edge that arrives while its timer is still busy restarts it.
//
// The 40 ms delay on the PG&E path is the timing system's requirement; doing
// it with a counter on a 1 MHz reference clock (DELAY_CYCLES = 40000) is this
// design's own choice.
module edge_delay #(
  parameter int unsigned DELAY_CYCLES =
      timing_pkg::ms_to_cycles(timing_pkg::REF_HZ, timing_pkg::PGE_DELAY_MS)
) (
  input  logic clk,    // reference clock
  input  logic rst_n,  // asynchronous reset, active low
  input  logic din,    // asynchronous input pulse train
  output logic dout    // din delayed by DELAY_CYCLES clk cycles
);
  localparam int unsigned LOAD = DELAY_CYCLES - 3;  // sync (2) + edge register (1)
  localparam int unsigned CW   = (LOAD > 1) ? $clog2(LOAD + 1) : 1;

  logic          din_s, din_q;
  logic          rise, fall;
  logic          rise_pend, fall_pend;
  logic [CW-1:0] rise_cnt, fall_cnt;

  sync2 u_sync (.clk(clk), .rst_n(rst_n), .d(din), .q(din_s));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) din_q <= 1'b0;
    else        din_q <= din_s;

  assign rise = din_s & ~din_q;
  assign fall = ~din_s & din_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rise_pend <= 1'b0;
      fall_pend <= 1'b0;
      rise_cnt  <= '0;
      fall_cnt  <= '0;
      dout      <= 1'b0;
    end else begin
      if (rise) begin
        rise_pend <= 1'b1;
        rise_cnt  <= CW'(LOAD);
      end else if (rise_pend) begin
        if (rise_cnt == '0) begin
          rise_pend <= 1'b0;
          dout      <= 1'b1;
        end else rise_cnt <= rise_cnt - 1'b1;
      end
      if (fall) begin
        fall_pend <= 1'b1;
        fall_cnt  <= CW'(LOAD);
      end else if (fall_pend) begin
        if (fall_cnt == '0) begin
          fall_pend <= 1'b0;
          dout      <= 1'b0;
        end else fall_cnt <= fall_cnt - 1'b1;
      end
    end

  initial assert (DELAY_CYCLES >= 3) else $error("edge_delay: DELAY_CYCLES must be at least 3");
endmodule
