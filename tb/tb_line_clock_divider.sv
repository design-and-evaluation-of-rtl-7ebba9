// tb_line_clock_divider: checks the line-frequency divider.
//
// A 60 Hz line clock (scaled to a 10 ns period) drives the default divider
// (divide by 6) and a divide-by-5 copy with a 1-period high phase. After every
// line edge the output is compared with a reference worked out from the
// number n of line edges since reset: clk_out is high when (n-1) mod DIV is
// below HIGH_COUNTS. The bench also counts output periods and checks that
// each lasts exactly DIV line periods (60 Hz / 6 = 10 Hz for the default).
`timescale 1ns/1ps
module tb_line_clock_divider;
  logic line_clk = 0, rst_n = 0;
  // reset from time 0, with a falling edge at 1 ns so that it takes effect
  initial begin #0.5 rst_n = 1; #0.5 rst_n = 0; end
  logic out6, out5;
  int checks = 0, failures = 0;
  int n = 0, rises6 = 0;
  realtime last_rise6 = -1;

  line_clock_divider u6 (.line_clk(line_clk), .rst_n(rst_n), .clk_out(out6));
  line_clock_divider #(.DIV(5), .HIGH_COUNTS(1)) u5 (.line_clk(line_clk), .rst_n(rst_n), .clk_out(out5));

  always #5 line_clk = ~line_clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL at %0t: %s", $realtime, what);
    end
  endtask

  always @(posedge out6) begin
    if (last_rise6 >= 0) check($realtime - last_rise6 == 60.0, "divide-by-6 period");
    last_rise6 = $realtime;
    rises6++;
  end

  initial begin
    #2;
    check(out6 == 0 && out5 == 0, "output low in reset");
    #15 rst_n = 1;
    repeat (200) begin
      @(posedge line_clk);
      n++;
      #1;
      check(out6 == (((n - 1) % 6) < 3), $sformatf("div6 edge %0d", n));
      check(out5 == (((n - 1) % 5) < 1), $sformatf("div5 edge %0d", n));
    end
    check(rises6 == 34, $sformatf("expected 34 output periods, saw %0d", rises6));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
