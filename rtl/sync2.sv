// sync2: two-flop synchroniser bringing an asynchronous level into the
// reference clock domain. q follows d two rising edges of clk later.
// Reset value is 0.
module sync2 (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);
  logic meta;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) {q, meta} <= 2'b00;
    else        {q, meta} <= {meta, d};
endmodule
