// glitch_free_clk_mux: switches between two unrelated clocks, clk0 and clk1,
// without producing a runt pulse on clk_out.
//
// Each input clock has an enable path of two D flip-flops. The first flop of a
// path samples, on the rising edge of its own clock, the AND of the select
// request for that path and the inverted enable of the other path; it removes
// metastability from the asynchronous select. The second flop retimes that
// value on the falling edge of the same clock, so an enable only ever changes
// while its clock is low. The clock is ANDed with its enable and the two
// gated clocks are ORed onto clk_out. Because each path's request is gated
// by the inverted final enable of the other path, a new clock is only
// enabled after the old one has been switched off.
//
//   select = 0 : clk0 reaches clk_out      select = 1 : clk1 reaches clk_out
//
// Timing: after select changes, the old clock stops at its next falling edge
// after its rising edge has seen the request (at most about one period of
// the old clock, plus the register stage). The new clock is then enabled after
// one rising and one falling edge of its own, and its next high phase is the
// first to reach clk_out. Switching therefore loses pulses, and it stalls if
// either clock has stopped.
//
// The flop arrangement, gates and their names (AND0-1, DFF0-1, ...) follow the
// published circuit. The active-low asynchronous clears clr0_n and clr1_n, one
// per path, are this design's addition: the circuit as drawn has no reset, and
// clr1_n also lets a controller switch clk1 off while clk1 has stopped.
// An assertion checks that the two final enables are never on together.
// en0 and en1 bring the final enables (DFFx-2 Q) out for monitoring.
module glitch_free_clk_mux (
  input  logic clk0,    // CLK0: PG&E 10 Hz clock
  input  logic clk1,    // CLK1: peaking strip 10 Hz clock
  input  logic select,  // SELECT: 0 = clk0, 1 = clk1 (asynchronous)
  input  logic clr0_n,  // clears the clk0 enable path
  input  logic clr1_n,  // clears the clk1 enable path
  output logic clk_out, // OUT CLOCK
  output logic en0,     // clk0 is gated through
  output logic en1      // clk1 is gated through
);
  logic dff0_1_q, dff0_2_q;  // clk0 path: rising-edge then falling-edge flop
  logic dff1_1_q, dff1_2_q;  // clk1 path: rising-edge then falling-edge flop
  logic and0_1, and1_1;      // request of each path

  assign and1_1 = select  & ~dff0_2_q;  // SELECT and Q_N of DFF0-2
  assign and0_1 = ~select & ~dff1_2_q;  // INV1(SELECT) and Q_N of DFF1-2

  always_ff @(posedge clk1 or negedge clr1_n)
    if (!clr1_n) dff1_1_q <= 1'b0;
    else         dff1_1_q <= and1_1;

  always_ff @(negedge clk1 or negedge clr1_n)
    if (!clr1_n) dff1_2_q <= 1'b0;
    else         dff1_2_q <= dff1_1_q;

  always_ff @(posedge clk0 or negedge clr0_n)
    if (!clr0_n) dff0_1_q <= 1'b0;
    else         dff0_1_q <= and0_1;

  always_ff @(negedge clk0 or negedge clr0_n)
    if (!clr0_n) dff0_2_q <= 1'b0;
    else         dff0_2_q <= dff0_1_q;

  // AND1-2, AND0-2 and OR1
  assign clk_out = (clk1 & dff1_2_q) | (clk0 & dff0_2_q);
  assign en0 = dff0_2_q;
  assign en1 = dff1_2_q;

  // The two final enables are never on together.
  // The two final enables are never on together. Enables change only on
  // falling clock edges, so they are sampled on the rising ones; the check is
  // off while either path is being cleared.
  a_one_hot_enable0: assert property (@(posedge clk0) disable iff (!clr0_n || !clr1_n)
                                      !(dff0_2_q && dff1_2_q))
    else $error("both clock paths enabled at once");
  a_one_hot_enable1: assert property (@(posedge clk1) disable iff (!clr0_n || !clr1_n)
                                      !(dff0_2_q && dff1_2_q))
    else $error("both clock paths enabled at once");
endmodule
