// tb_digital_keying_top: end-to-end test of the three keyers at their default
// bit periods (1000, 4000 and 2000 clocks), with no parameter overrides.
//
// Each keyer sends several complete PROM words, address 1 (0011001100110011)
// first, each loaded with sl low and then shifted out with sl high for 16 bit
// periods and a little more. A reference model per keyer (carrier phase,
// loaded word, one shift every N clocks after sl rises) gives the expected
// output sample and serial bit on every clock. The keyers are driven with
// different addresses and timing so they run independently; the BPSK carrier
// is paused for a while. The test counts how often each mechanism happened:
// loads, bit shifts, and for each keyer the two keyed states (BASK carrier
// on/off, BFSK F1/F2, BPSK 0/180 degrees), plus a carrier pause and a reset;
// one that never happened counts as a failure.
module tb_digital_keying_top;
  import tb_ref_pkg::*;

  localparam int AW = 6;

  typedef enum int {ASK, FSK, PSK} kind_e;

  // reference model of one keyer, state as it will be after the next edge
  class keyer_model;
    kind_e       kind;
    int unsigned n, s1, s2;
    int unsigned p1, p2, j;
    logic [15:0] c1, c2, sreg;
    int          loads, shifts, on1, on0;

    function new(kind_e k, int unsigned n_, int unsigned s1_, int unsigned s2_);
      kind = k; n = n_; s1 = s1_; s2 = s2_;
      loads = 0; shifts = 0; on1 = 0; on0 = 0;
      reset();
    endfunction

    function void reset();
      p1 = 0; p2 = 0; j = 0; sreg = '0;
      c1 = ref_sine(0, AW); c2 = ref_sine(0, AW);
    endfunction

    function void clock_edge(logic rst, logic en, logic sl, logic [3:0] addr);
      if (rst) begin reset(); return; end
      if (en) begin
        c1 = ref_sine(p1, AW); p1 = (p1 + s1) % 64;
        c2 = ref_sine(p2, AW); p2 = (p2 + s2) % 64;
      end
      if (!sl) begin
        sreg = ref_prom(addr); j = 0; loads++;
      end else begin
        j++;
        if (j > 1 && (j - 1) % n == 0) begin sreg = {sreg[14:0], 1'b0}; shifts++; end
      end
    endfunction

    function logic bit_out();
      return sreg[15];
    endfunction

    function logic [15:0] sig_out();
      case (kind)
        ASK:     return sreg[15] ? c1 : 16'h0000;
        FSK:     return sreg[15] ? c1 : c2;
        default: return sreg[15] ? 16'(65535 - int'(c1)) : c1;
      endcase
    endfunction

    function void count();
      if (sreg[15]) on1++; else on0++;
    endfunction
  endclass

  logic clk = 1'b0;
  logic rst;
  logic ask_en, ask_sl, fsk_en, fsk_sl, psk_en, psk_sl;
  logic [3:0] ask_address, fsk_address, psk_address;
  logic [15:0] bask_signal, bfsk_signal, bpsk_signal;
  logic ask_bit, fsk_bit, psk_bit;
  int checks = 0, failures = 0;
  int pauses = 0, resets = 0;

  always #5 clk = ~clk;

  digital_keying_top dut (
    .clk(clk), .rst(rst),
    .ask_en(ask_en), .ask_sl(ask_sl), .ask_address(ask_address),
    .bask_signal(bask_signal), .ask_bit(ask_bit),
    .fsk_en(fsk_en), .fsk_sl(fsk_sl), .fsk_address(fsk_address),
    .bfsk_signal(bfsk_signal), .fsk_bit(fsk_bit),
    .psk_en(psk_en), .psk_sl(psk_sl), .psk_address(psk_address),
    .bpsk_signal(bpsk_signal), .psk_bit(psk_bit));

  keyer_model mask = new(ASK, 1000, 1, 1);
  keyer_model mfsk = new(FSK, 4000, 4, 1);
  keyer_model mpsk = new(PSK, 2000, 1, 1);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // per-keyer stimulus: sl low for a few clocks, then one word's worth of shifting
  int ask_c, fsk_c, psk_c, ask_w, fsk_w, psk_w;

  function automatic logic [3:0] next_addr(int w);
    return (w == 0) ? 4'd1 : 4'(w * 5 + 3);
  endfunction

  function automatic logic sl_at(int c);
    return c >= 4;  // four load clocks, then shift
  endfunction

  initial begin
    #40000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    rst = 1'b1;
    ask_en = 1'b1; fsk_en = 1'b1; psk_en = 1'b1;
    ask_sl = 1'b0; fsk_sl = 1'b0; psk_sl = 1'b0;
    ask_address = 4'd1; fsk_address = 4'd1; psk_address = 4'd1;
    @(posedge clk);
    mask.clock_edge(1'b1, 1'b1, 1'b0, 4'd1);
    mfsk.clock_edge(1'b1, 1'b1, 1'b0, 4'd1);
    mpsk.clock_edge(1'b1, 1'b1, 1'b0, 4'd1);
    resets++;
    ask_c = 0; fsk_c = 0; psk_c = 0; ask_w = 0; fsk_w = 0; psk_w = 0;
    // the BFSK keyer sends 2 words; the others keep sending meanwhile
    for (cyc = 0; fsk_w < 2; cyc++) begin
      @(negedge clk);
      check(bask_signal === mask.sig_out() && ask_bit === mask.bit_out(), "BASK output");
      check(bfsk_signal === mfsk.sig_out() && fsk_bit === mfsk.bit_out(), "BFSK output");
      check(bpsk_signal === mpsk.sig_out() && psk_bit === mpsk.bit_out(), "BPSK output");
      if (!rst) begin mask.count(); mfsk.count(); mpsk.count(); end
      rst = 1'b0;
      // next inputs
      ask_sl = sl_at(ask_c); ask_address = next_addr(ask_w);
      fsk_sl = sl_at(fsk_c); fsk_address = next_addr(fsk_w);
      psk_sl = sl_at(psk_c); psk_address = next_addr(psk_w);
      psk_en = !(cyc >= 50000 && cyc < 50300);
      if (cyc == 50000) pauses++;
      if (++ask_c == 4 + 16 * 1000 + 7) begin ask_c = 0; ask_w++; end
      if (++fsk_c == 4 + 16 * 4000 + 7) begin fsk_c = 0; fsk_w++; end
      if (++psk_c == 4 + 16 * 2000 + 7) begin psk_c = 0; psk_w++; end
      mask.clock_edge(rst, ask_en, ask_sl, ask_address);
      mfsk.clock_edge(rst, fsk_en, fsk_sl, fsk_address);
      mpsk.clock_edge(rst, psk_en, psk_sl, psk_address);
    end
    $display("cycles %0d", cyc);
    $display("BASK: loads %0d shifts %0d carrier-on clocks %0d zero clocks %0d",
             mask.loads, mask.shifts, mask.on1, mask.on0);
    $display("BFSK: loads %0d shifts %0d F1 clocks %0d F2 clocks %0d",
             mfsk.loads, mfsk.shifts, mfsk.on1, mfsk.on0);
    $display("BPSK: loads %0d shifts %0d 180-degree clocks %0d 0-degree clocks %0d",
             mpsk.loads, mpsk.shifts, mpsk.on1, mpsk.on0);
    $display("carrier pauses %0d resets %0d", pauses, resets);
    check(mask.loads > 0 && mfsk.loads > 0 && mpsk.loads > 0, "loads happened");
    check(mask.shifts >= 16 && mfsk.shifts >= 32 && mpsk.shifts >= 16, "shifts happened");
    check(mask.on1 > 0 && mask.on0 > 0, "BASK carrier on and off");
    check(mfsk.on1 > 0 && mfsk.on0 > 0, "BFSK F1 and F2");
    check(mpsk.on1 > 0 && mpsk.on0 > 0, "BPSK 0 and 180 degrees");
    check(pauses > 0 && resets > 0, "pause and reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
