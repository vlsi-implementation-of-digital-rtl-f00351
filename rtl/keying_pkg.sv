// keying_pkg: types and constants shared by the BASK, BFSK and BPSK modulators.
//
// Both the modulating data words and the carrier samples are 16 bits wide, as
// the modulators are specified. Carrier samples are unsigned offset binary:
// mid-scale (16'h8000) is the zero line of the sine, so that a bitwise NOT of a
// sample (65535 - x) mirrors it about mid-scale, i.e. shifts it by 180 degrees.
// The offset-binary coding, the sine-table function and the PROM contents
// other than word 1 are this design's own choices.
package keying_pkg;

  localparam int DATA_W    = 16;  // width of one stored data word
  localparam int CARRIER_W = 16;  // width of one carrier sample
  localparam int PROM_AW   = 4;   // PROM address width (16 words)

  typedef logic [DATA_W-1:0]    data_word_t;
  typedef logic [CARRIER_W-1:0] carrier_t;

  // Default PROM image. Word 0 holds the 11-bit example sequence 00110100010
  // right-aligned; word 1 holds 0011001100110011; the rest are test patterns.
  localparam data_word_t PROM_INIT [2**PROM_AW] = '{
    16'b0000_0001_1010_0010,  // 0
    16'b0011_0011_0011_0011,  // 1
    16'hAAAA, 16'h5555, 16'hFFFF, 16'h0000, 16'hF0F0, 16'h0F0F,
    16'h8001, 16'h7FFE, 16'hC3C3, 16'h3C3C, 16'h1234, 16'hABCD,
    16'hDEAD, 16'hBEEF
  };

  // One sample of a full sine period of 2**aw points, in offset binary of
  // width w:  sample(k) = 2**(w-1) + round((2**(w-1) - 1) * sin(2*pi*k / 2**aw)).
  function automatic int unsigned sine_sample(int unsigned k, int aw, int w);
    real ph, amp;
    ph  = 2.0 * 3.141592653589793 * real'(k) / real'(2 ** aw);
    amp = real'((2 ** (w - 1)) - 1);
    return unsigned'((2 ** (w - 1)) + $rtoi($floor(amp * $sin(ph) + 0.5)));
  endfunction

endpackage
