// tb_bask_generator: end-to-end check of the BASK modulator at a short bit period.
//
// The PROM words at several addresses (address 1 first) are loaded with sl
// low for a random number of clocks and then shifted out with sl high for
// 17 bit periods and a little more. A reference model written in the
// testbench tracks the carrier phase, the loaded word and the bit
// strobe (one shift every N clocks after sl rises) and gives the expected
// bask_signal on every clock. The carrier is paused (en low) for a stretch and
// the design is reset once in the middle of a word. Clocks spent on data 1
// and data 0 are counted, and both must occur.
module tb_bask_generator;
  import tb_ref_pkg::*;

  localparam int unsigned N = 10;
  localparam int          AW = 6;
  localparam int unsigned STEP = 1;

  logic clk = 1'b0;
  logic rst, en, sl;
  logic [3:0] address;
  logic [15:0] sig, data;
  logic piso_mux, clk_div;
  int checks = 0, failures = 0;
  int ones = 0, zeros = 0, loads = 0;

  always #5 clk = ~clk;

  bask_generator #(.N(N), .LUT_AW(AW), .STEP(STEP)) dut (
    .clk(clk), .rst(rst), .en(en), .sl(sl), .address(address),
    .bask_signal(sig), .data(data), .piso_mux(piso_mux), .clk_div(clk_div));

  // reference model state, as it will be after the next rising edge
  logic [15:0] m_car;
  int unsigned m_ph;
  logic [15:0] m_sreg;
  int unsigned m_j;

  task automatic model_edge();
    if (rst) begin
      m_ph = 0; m_car = ref_sine(0, AW);
      m_sreg = '0; m_j = 0;
    end else begin
      if (en) begin
        m_car = ref_sine(m_ph, AW); m_ph = (m_ph + STEP) % 64;
      end
      if (!sl) begin
        m_sreg = ref_prom(address); m_j = 0;
      end else begin
        m_j++;
        if (m_j > 1 && (m_j - 1) % N == 0) m_sreg = {m_sreg[14:0], 1'b0};
      end
    end
  endtask

  function automatic logic [15:0] expected();
    logic b;
    b = m_sreg[15];
    return b ? m_car : 16'h0000;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // compare, then apply new inputs and advance the model to the next edge
  task automatic step(input logic r, input logic e, input logic s, input logic [3:0] a);
    @(negedge clk);
    check(sig === expected(), "bask_signal");
    check(piso_mux === m_sreg[15], "serial bit");
    check(data === ref_prom(address), "PROM word");
    if (!rst) begin
      if (m_sreg[15]) ones++; else zeros++;
    end
    rst = r; en = e; sl = s; address = a;
    if (!r && !s) loads++;
    model_edge();
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] a;
    rst = 1'b1; en = 1'b1; sl = 1'b0; address = 4'd1;
    @(posedge clk);
    model_edge();
    repeat (2) step(1'b1, 1'b1, 1'b0, 4'd1);
    for (int w = 0; w < 6; w++) begin
      a = (w == 0) ? 4'd1 : 4'($urandom);
      repeat ($urandom_range(1, 6)) step(1'b0, 1'b1, 1'b0, a);
      for (int c = 0; c < 17 * N + 5; c++)
        step(1'b0, !(w == 2 && c > 20 && c < 40), 1'b1, a);
    end
    // reset in the middle of a word, then one more word
    repeat (3) step(1'b0, 1'b1, 1'b0, 4'd4);
    repeat (3 * N) step(1'b0, 1'b1, 1'b1, 4'd4);
    step(1'b1, 1'b1, 1'b1, 4'd4);
    repeat (2 * N) step(1'b0, 1'b1, 1'b1, 4'd4);
    repeat (2) step(1'b0, 1'b1, 1'b0, 4'd0);
    repeat (17 * N) step(1'b0, 1'b1, 1'b1, 4'd0);
    step(1'b0, 1'b1, 1'b1, 4'd0);
    check(ones > 0, "data 1 occurred");
    check(zeros > 0, "data 0 occurred");
    $display("clocks on data 1: %0d, on data 0: %0d, loads: %0d", ones, zeros, loads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
