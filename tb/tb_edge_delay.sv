// tb_edge_delay: checks that the delay moves both edges of a slow pulse train
// by exactly DELAY_CYCLES reference cycles.
//
// Two copies run side by side: the default one (40 ms at 1 MHz, 40000
// cycles) and a short one (40 cycles). The input is changed between clock
// edges with random pulse widths, keeping consecutive rising edges, and consecutive
// falling edges, more than the delay apart.
// The bench records the input level seen at every rising clock edge and,
// after edge j, expects dout to equal the level recorded at edge j - DELAY.
`timescale 1ns/1ps
module tb_edge_delay;
  localparam int unsigned D_DEF   = 40000;
  localparam int unsigned D_SHORT = 40;

  logic clk = 0, rst_n = 0;
  // reset from time 0, with a falling edge at 1 ns so that it takes effect
  initial begin #0.5 rst_n = 1; #0.5 rst_n = 0; end
  logic din_def = 0, din_short = 0;
  logic dout_def, dout_short;
  int checks = 0, failures = 0, cycle = 0;
  bit hist_def[$], hist_short[$];
  int edges_def = 0, edges_short = 0;

  edge_delay u_def (.clk(clk), .rst_n(rst_n), .din(din_def), .dout(dout_def));
  edge_delay #(.DELAY_CYCLES(D_SHORT)) u_short (.clk(clk), .rst_n(rst_n), .din(din_short), .dout(dout_short));

  always #500 clk = ~clk;  // 1 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL at cycle %0d: %s", cycle, what);
    end
  endtask

  // record the input and check the output after each edge
  always @(posedge clk) if (rst_n) begin
    hist_def.push_back(din_def);
    hist_short.push_back(din_short);
    cycle++;
    #1;
    if (hist_def.size() > D_DEF) begin
      check(dout_def == hist_def.pop_front(), "default delay");
    end else check(dout_def == 0, "default output before first delayed edge");
    if (hist_short.size() > D_SHORT) begin
      check(dout_short == hist_short.pop_front(), "short delay");
    end else check(dout_short == 0, "short output before first delayed edge");
  end

  always @(dout_def)   edges_def++;
  always @(dout_short) edges_short++;

  // random pulse train; low phases above d cycles keep both the rise-to-rise
  // and the fall-to-fall spacing above the delay
  task automatic drive(ref logic sig, input int unsigned d, input int periods);
    repeat (periods) begin
      int unsigned hi, lo;
      hi = $urandom_range(3, d + d / 2);
      lo = $urandom_range(d + 2, d + d / 2);
      @(negedge clk); sig = 1;
      repeat (hi) @(negedge clk);
      sig = 0;
      repeat (lo - 1) @(negedge clk);
    end
  endtask

  initial begin
    #1700 rst_n = 1;
    fork
      drive(din_def, D_DEF, 6);
      drive(din_short, D_SHORT, 400);
    join
    repeat (D_DEF + 5) @(posedge clk);
    check(edges_def >= 12, $sformatf("default output edges %0d", edges_def));
    check(edges_short >= 800, $sformatf("short output edges %0d", edges_short));
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
