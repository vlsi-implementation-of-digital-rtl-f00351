// sine_wave_gen: sampled sinusoidal carrier source.
//
// A LUT_AW-bit phase counter steps through a table that holds one full sine
// period of 2**LUT_AW samples; each enabled clock the counter advances by STEP,
// so the carrier frequency is STEP * f_clk / 2**LUT_AW. The table is computed
// at elaboration from keying_pkg::sine_sample, so no data file is needed.
// Samples are CARRIER_W-bit unsigned offset binary (mid-scale is the zero line).
//
// Interface: clk, rst (synchronous, active high: phase back to 0), en (advance
// the phase), wave (registered sample). Timing: wave shows the sample of the
// current phase one clock later; with en low the output holds.
//
// The 16-bit carrier width and the enable input follow the modulators'
// description; the table size, the step-based frequency control and the
// output coding are this design's own choices.
module sine_wave_gen
  import keying_pkg::*;
#(
  parameter int          LUT_AW = 6,  // log2 of samples per carrier period
  parameter int unsigned STEP   = 1   // phase increment per enabled clock
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     en,
  output carrier_t wave
);

  typedef carrier_t lut_t [2**LUT_AW];

  function automatic lut_t make_lut();
    lut_t t;
    for (int unsigned k = 0; k < 2**LUT_AW; k++)
      t[k] = carrier_t'(sine_sample(k, LUT_AW, CARRIER_W));
    return t;
  endfunction

  localparam lut_t LUT = make_lut();

  logic [LUT_AW-1:0] phase;

  always_ff @(posedge clk) begin
    if (rst) begin
      phase <= '0;
      wave  <= LUT[0];
    end else if (en) begin
      phase <= phase + LUT_AW'(STEP);
      wave  <= LUT[phase];
    end
  end

endmodule
