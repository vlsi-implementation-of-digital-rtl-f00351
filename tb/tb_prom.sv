// tb_prom: reads every word of the default PROM image and of a second,
// overriding image, and compares each with an independently written list.
module tb_prom;
  import tb_ref_pkg::*;

  logic [3:0]  addr;
  logic [15:0] d_def, d_alt;
  int checks = 0, failures = 0;

  localparam logic [15:0] ALT [16] = '{
    16'h0001, 16'h0002, 16'h0004, 16'h0008, 16'h0010, 16'h0020, 16'h0040, 16'h0080,
    16'h0100, 16'h0200, 16'h0400, 16'h0800, 16'h1000, 16'h2000, 16'h4000, 16'h8000};

  prom                        dut_def (.addr(addr), .data(d_def));
  prom #(.AW(4), .INIT(ALT))  dut_alt (.addr(addr), .data(d_alt));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int pass = 0; pass < 2; pass++)
      for (int i = 0; i < 16; i++) begin
        addr = 4'(pass ? 15 - i : i);
        #1;
        checks++;
        if (d_def !== ref_prom(addr)) begin
          failures++; $display("FAIL default word %0d: %h", addr, d_def);
        end
        checks++;
        if (d_alt !== (16'h1 << addr)) begin
          failures++; $display("FAIL override word %0d: %h", addr, d_alt);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
