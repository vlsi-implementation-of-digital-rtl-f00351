// tb_mux2: random data on both inputs with both select values; the output
// must equal d1 when sel is 1 and d0 when sel is 0.
module tb_mux2;
  logic sel;
  logic [15:0] d0, d1, y;
  int checks = 0, failures = 0;

  mux2 #(.W(16)) dut (.sel(sel), .d0(d0), .d1(d1), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      d0 = 16'($urandom); d1 = 16'($urandom); sel = i[0];
      if (i == 0) begin d0 = 16'h0000; d1 = 16'hFFFF; end
      #1;
      checks++;
      if (y !== (sel ? d1 : d0)) begin
        failures++; $display("FAIL sel=%b d0=%h d1=%h y=%h", sel, d0, d1, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
