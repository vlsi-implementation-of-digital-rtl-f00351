// tb_inverter: the output must be 65535 - a for every input tried, i.e. the
// sample mirrored about mid-scale, and must differ from the input in all bits.
module tb_inverter;
  logic [15:0] a, y;
  int checks = 0, failures = 0;

  inverter #(.W(16)) dut (.a(a), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      a = (i < 3) ? 16'(i * 32767) : 16'($urandom);
      #1;
      checks++;
      if (int'(y) != 65535 - int'(a) || (y & a) != 16'h0) begin
        failures++; $display("FAIL a=%h y=%h", a, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
