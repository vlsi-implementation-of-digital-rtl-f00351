// bpsk_generator: binary phase shift keying modulator.
//
// One sine generator gives the 0-degree carrier; an inverter (bitwise NOT of
// the offset-binary sample) gives the 180-degree carrier. A PROM word, chosen
// by address, is loaded into a 16-bit PISO register while sl is low; with sl
// high it is shifted out MSB first, one bit every N clocks. The serial bit
// selects, through a 2:1 multiplexer, the 180-degree carrier for a 1 bit and
// the 0-degree carrier for a 0 bit.
//
// Interface: clk, rst (synchronous, active high), en (runs the carrier), sl
// (0 = load PROM word, 1 = shift out), address (PROM word); outputs
// bpsk_signal (16-bit offset-binary samples), and for observation carrier_0
// and carrier_180, data (the PROM word), piso_mux (the serial bit) and clk_div
// (bit clock). Timing: after sl rises, each data bit lasts N clocks; the first
// is the word's MSB.
//
// The block structure (sine generator, inverter, PROM, PISO, 2:1 MUX), the
// mapping of 1 to 180 degrees, and N's default of 2000 follow the described
// design; the carrier table and frequency and the other details are this
// design's own choices.
module bpsk_generator
  import keying_pkg::*;
#(
  parameter int unsigned N       = 2000,     // clocks per data bit
  parameter int          LUT_AW  = 6,        // log2 of samples per carrier period
  parameter int unsigned STEP    = 1,        // carrier phase step per clock
  parameter data_word_t  INIT [2**PROM_AW] = PROM_INIT
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               en,
  input  logic               sl,
  input  logic [PROM_AW-1:0] address,
  output carrier_t           bpsk_signal,
  output carrier_t           carrier_0,
  output carrier_t           carrier_180,
  output data_word_t         data,
  output logic               piso_mux,
  output logic               clk_div
);

  logic tick;

  sine_wave_gen #(.LUT_AW(LUT_AW), .STEP(STEP)) a1 (
    .clk(clk), .rst(rst), .en(en), .wave(carrier_0));

  inverter #(.W(CARRIER_W)) u_inv (.a(carrier_0), .y(carrier_180));

  prom #(.AW(PROM_AW), .INIT(INIT)) u_prom (.addr(address), .data(data));

  bit_clock_div #(.N(N)) u_div (
    .clk(clk), .rst(rst), .clr(!sl), .tick(tick), .clk_div(clk_div));

  piso #(.W(DATA_W)) u_piso (
    .clk(clk), .rst(rst), .sl(sl), .shift_en(tick), .pdata(data), .sout(piso_mux));

  mux2 #(.W(CARRIER_W)) u_mux (
    .sel(piso_mux), .d0(carrier_0), .d1(carrier_180), .y(bpsk_signal));

endmodule
