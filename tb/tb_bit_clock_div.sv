// tb_bit_clock_div: checks that tick comes exactly once every N clocks, that
// the first tick after reset or clr comes N clocks later, and that clk_div
// toggles on each tick. Two instances: N=7 and N=1000.
module tb_bit_clock_div;
  logic clk = 1'b0;
  logic rst, clr;
  logic t7, c7, t1k, c1k;
  int checks = 0, failures = 0;
  int n7, n1k, last7, last1k, cyc, ticks7, ticks1k;
  logic prev_c7;

  always #5 clk = ~clk;

  bit_clock_div #(.N(7))    d7  (.clk(clk), .rst(rst), .clr(clr), .tick(t7),  .clk_div(c7));
  bit_clock_div #(.N(1000)) d1k (.clk(clk), .rst(rst), .clr(clr), .tick(t1k), .clk_div(c1k));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; clr = 1'b0;
    @(negedge clk); @(negedge clk);
    check(!t7 && !c7 && !t1k && !c1k, "reset state");
    rst = 1'b0;
    cyc = 0; last7 = 0; last1k = 0; ticks7 = 0; ticks1k = 0; prev_c7 = c7;
    repeat (3500) begin
      @(negedge clk); cyc++;
      if (t7) begin
        check(cyc - last7 == 7, "N=7 spacing");
        check(c7 != prev_c7, "clk_div toggles on tick");
        last7 = cyc; ticks7++;
      end else check(c7 === prev_c7, "clk_div steady between ticks");
      prev_c7 = c7;
      if (t1k) begin
        check(cyc - last1k == 1000, "N=1000 spacing");
        last1k = cyc; ticks1k++;
      end
    end
    check(ticks7 == 500, "N=7 tick count");
    check(ticks1k == 3, "N=1000 tick count");
    // clr restarts the count
    clr = 1'b1; @(negedge clk); clr = 1'b0; cyc = 0;
    repeat (6) begin @(negedge clk); cyc++; check(!t7, "no tick before N after clr"); end
    @(negedge clk); cyc++;
    check(t7, "tick N clocks after clr");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
