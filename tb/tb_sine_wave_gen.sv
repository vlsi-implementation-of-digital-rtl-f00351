// tb_sine_wave_gen: checks the carrier generator sample by sample.
//
// Two instances run from one clock: STEP=1 and STEP=3, each on a 64-point
// table. Each output sample is compared with a reference sine computed in the
// testbench, including the hold while en is low and the return to phase 0 on
// reset. It also checks the carrier period (64 clocks at STEP=1) as the
// distance between two peak samples, and that the samples span close to the full 16-bit range.
module tb_sine_wave_gen;
  import tb_ref_pkg::*;

  logic clk = 1'b0;
  logic rst, en;
  logic [15:0] w1, w3;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sine_wave_gen #(.LUT_AW(6), .STEP(1)) dut1 (.clk(clk), .rst(rst), .en(en), .wave(w1));
  sine_wave_gen #(.LUT_AW(6), .STEP(3)) dut3 (.clk(clk), .rst(rst), .en(en), .wave(w3));

  int unsigned ph1, ph3;
  logic [15:0] e1, e3;
  logic [15:0] vmin, vmax;
  int period, first_peak;

  task automatic check(input logic [15:0] got, input logic [15:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; en = 1'b0;
    repeat (3) @(posedge clk);
    #1;
    check(w1, ref_sine(0, 6), "reset sample");
    rst = 1'b0; en = 1'b1;
    ph1 = 0; ph3 = 0;
    vmin = 16'hFFFF; vmax = 16'h0000; period = -1; first_peak = -1;
    for (int c = 0; c < 300; c++) begin
      // pause the carrier for a few clocks
      en = !(c >= 100 && c < 110);
      @(posedge clk); #1;
      if (en) begin
        e1 = ref_sine(ph1, 6); ph1 = (ph1 + 1) % 64;
        e3 = ref_sine(ph3, 6); ph3 = (ph3 + 3) % 64;
      end
      check(w1, e1, "STEP=1 sample");
      check(w3, e3, "STEP=3 sample");
      if (c < 64) begin
        if (w1 < vmin) vmin = w1;
        if (w1 > vmax) vmax = w1;
      end
      // the peak sample occurs once per period
      if (w1 == ref_sine(16, 6)) begin
        if (first_peak < 0) first_peak = c;
        else if (period < 0) period = c - first_peak;
      end
    end
    checks++;
    if (period != 64) begin failures++; $display("FAIL period %0d", period); end
    checks++;
    if (vmin > 16'd10 || vmax < 16'd65525) begin
      failures++; $display("FAIL range %h..%h", vmin, vmax);
    end
    // synchronous reset returns the phase to 0
    rst = 1'b1; @(posedge clk); #1; rst = 1'b0;
    @(posedge clk); #1;
    check(w1, ref_sine(0, 6), "sample after reset");
    @(posedge clk); #1;
    check(w1, ref_sine(1, 6), "second sample after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
