// line_clock_divider: derives the 10 Hz PG&E "housekeeping" clock from the
// 60 Hz power line.
//
// A modulo-DIV counter runs on the rising edge of the line clock (a square
// wave squared up from the mains, supplied to this block). clk_out is
// registered and high for the first HIGH_COUNTS line periods of every DIV,
// so it is a glitch-free clock of line_clk / DIV with its rising edge one
// line period after the counter wraps. The default DIV = 6 is 60 Hz / 10 Hz.
// The duty cycle (half of DIV) and the asynchronous active-low reset are this
// design's own choices.
module line_clock_divider #(
  parameter int unsigned DIV         = timing_pkg::LINE_HZ / timing_pkg::TRIG_HZ,
  parameter int unsigned HIGH_COUNTS = DIV / 2
) (
  input  logic line_clk, // 60 Hz line clock
  input  logic rst_n,    // asynchronous reset, active low
  output logic clk_out   // line_clk / DIV
);
  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;
  logic [CW-1:0] cnt;

  always_ff @(posedge line_clk or negedge rst_n)
    if (!rst_n) begin
      cnt     <= '0;
      clk_out <= 1'b0;
    end else begin
      cnt     <= (cnt == CW'(DIV - 1)) ? '0 : cnt + 1'b1;
      clk_out <= (cnt < CW'(HIGH_COUNTS));
    end

  initial assert (DIV >= 2 && HIGH_COUNTS >= 1 && HIGH_COUNTS < DIV)
    else $error("line_clock_divider: need 1 <= HIGH_COUNTS < DIV");
endmodule
