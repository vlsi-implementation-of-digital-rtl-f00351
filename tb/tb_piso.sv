// tb_piso: loads random 16-bit words and shifts them out under randomly
// spaced strobes, checking each serial bit (MSB first), the hold between
// strobes, the zero fill after 16 shifts, reload while sl is low, and reset.
module tb_piso;
  logic clk = 1'b0;
  logic rst, sl, shift_en;
  logic [15:0] pdata, word;
  logic sout;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  piso #(.W(16)) dut (.clk(clk), .rst(rst), .sl(sl), .shift_en(shift_en),
                      .pdata(pdata), .sout(sout));

  task automatic check(input logic exp, input string what);
    checks++;
    if (sout !== exp) begin
      failures++; $display("FAIL %s: got %b expected %b at %0t", what, sout, exp, $time);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; sl = 1'b0; shift_en = 1'b0; pdata = 16'hFFFF;
    @(negedge clk); @(negedge clk);
    check(1'b0, "reset clears");
    rst = 1'b0;
    for (int t = 0; t < 40; t++) begin
      word = 16'($urandom);
      if (t == 0) word = 16'b0011001100110011;
      pdata = word; sl = 1'b0;
      @(negedge clk);
      check(word[15], "MSB after load");
      // a strobe while loading must not shift
      shift_en = 1'b1; @(negedge clk); shift_en = 1'b0;
      check(word[15], "no shift while sl low");
      pdata = ~word;  // the parallel input changes; the register must not follow
      sl = 1'b1;
      for (int b = 1; b < 19; b++) begin
        repeat ($urandom_range(0, 3)) begin
          @(negedge clk);
          check(b - 1 < 16 ? word[16 - b] : 1'b0, "hold between strobes");
        end
        shift_en = 1'b1; @(negedge clk); shift_en = 1'b0;
        check(b < 16 ? word[15 - b] : 1'b0, "bit after strobe");
      end
    end
    // reset in the middle of a word
    pdata = 16'hFFFF; sl = 1'b0; @(negedge clk); sl = 1'b1;
    rst = 1'b1; @(negedge clk); rst = 1'b0;
    check(1'b0, "reset mid-word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
