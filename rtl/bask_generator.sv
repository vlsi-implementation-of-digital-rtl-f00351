// bask_generator: binary amplitude shift keying modulator.
//
// A PROM word, chosen by address, is loaded into a 16-bit PISO register while
// sl is low; with sl high it is shifted out MSB first, one bit every N clocks.
// The serial bit drives the select line of a 2:1 multiplexer whose inputs are
// ground (data 0) and the sine carrier (data 1), so bask_signal is the carrier
// during a 1 bit and zero during a 0 bit.
//
// Interface: clk, rst (synchronous, active high), en (runs the carrier), sl
// (0 = load PROM word, 1 = shift out), address (PROM word); outputs
// bask_signal (16-bit offset-binary samples; 0 during a 0 bit), and for
// observation data (the PROM word), piso_mux (the serial bit) and clk_div
// (bit clock, toggling once per bit). Timing: after sl rises, each data bit
// lasts N clocks; the first is the word's MSB.
//
// The block structure (sine generator, PROM, PISO, 2:1 MUX with one input
// grounded) and N's default of 1000 follow the described design; the carrier
// table size and frequency, the bit-rate strobe and the sl coding are this
// design's own choices.
module bask_generator
  import keying_pkg::*;
#(
  parameter int unsigned N       = 1000,     // clocks per data bit
  parameter int          LUT_AW  = 6,        // log2 of samples per carrier period
  parameter int unsigned STEP    = 1,        // carrier phase step per clock
  parameter data_word_t  INIT [2**PROM_AW] = PROM_INIT
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               en,
  input  logic               sl,
  input  logic [PROM_AW-1:0] address,
  output carrier_t           bask_signal,
  output data_word_t         data,
  output logic               piso_mux,
  output logic               clk_div
);

  carrier_t carrier;
  logic     tick;

  sine_wave_gen #(.LUT_AW(LUT_AW), .STEP(STEP)) a1 (
    .clk(clk), .rst(rst), .en(en), .wave(carrier));

  prom #(.AW(PROM_AW), .INIT(INIT)) u_prom (.addr(address), .data(data));

  bit_clock_div #(.N(N)) u_div (
    .clk(clk), .rst(rst), .clr(!sl), .tick(tick), .clk_div(clk_div));

  piso #(.W(DATA_W)) u_piso (
    .clk(clk), .rst(rst), .sl(sl), .shift_en(tick), .pdata(data), .sout(piso_mux));

  mux2 #(.W(CARRIER_W)) u_mux (
    .sel(piso_mux), .d0('0), .d1(carrier), .y(bask_signal));

endmodule
