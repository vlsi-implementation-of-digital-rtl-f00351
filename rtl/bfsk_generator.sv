// bfsk_generator: binary frequency shift keying modulator.
//
// Two sine generators run side by side at F1 (phase step STEP_F1) and F2
// (phase step STEP_F2). A PROM word, chosen by address, is loaded into a
// 16-bit PISO register while sl is low; with sl high it is shifted out MSB
// first, one bit every N clocks. The serial bit selects, through a 2:1
// multiplexer, the F1 carrier for a 1 bit and the F2 carrier for a 0 bit.
//
// Interface: clk, rst (synchronous, active high), en (runs both carriers),
// sl (0 = load PROM word, 1 = shift out), address (PROM word); outputs
// bfsk_signal (16-bit offset-binary samples), and for observation the two
// carriers carrier_f1 and carrier_f2, data (the PROM word), piso_mux (the
// serial bit) and clk_div (bit clock). Timing: after sl rises, each data bit
// lasts N clocks; the first is the word's MSB. Both carriers run continuously,
// so the output switches frequency with a phase jump at bit edges.
//
// The block structure (two sine generators, PROM, PISO, 2:1 MUX), the mapping
// of 1 to F1 and 0 to F2, and N's default of 4000 follow the described
// design; the two frequencies (F1 = 4 x F2 here) and the other details are
// this design's own choices.
module bfsk_generator
  import keying_pkg::*;
#(
  parameter int unsigned N       = 4000,     // clocks per data bit
  parameter int          LUT_AW  = 6,        // log2 of samples per carrier period
  parameter int unsigned STEP_F1 = 4,        // phase step of carrier F1 (data 1)
  parameter int unsigned STEP_F2 = 1,        // phase step of carrier F2 (data 0)
  parameter data_word_t  INIT [2**PROM_AW] = PROM_INIT
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               en,
  input  logic               sl,
  input  logic [PROM_AW-1:0] address,
  output carrier_t           bfsk_signal,
  output carrier_t           carrier_f1,
  output carrier_t           carrier_f2,
  output data_word_t         data,
  output logic               piso_mux,
  output logic               clk_div
);

  logic tick;

  sine_wave_gen #(.LUT_AW(LUT_AW), .STEP(STEP_F1)) a1 (
    .clk(clk), .rst(rst), .en(en), .wave(carrier_f1));

  sine_wave_gen #(.LUT_AW(LUT_AW), .STEP(STEP_F2)) a2 (
    .clk(clk), .rst(rst), .en(en), .wave(carrier_f2));

  prom #(.AW(PROM_AW), .INIT(INIT)) u_prom (.addr(address), .data(data));

  bit_clock_div #(.N(N)) u_div (
    .clk(clk), .rst(rst), .clr(!sl), .tick(tick), .clk_div(clk_div));

  piso #(.W(DATA_W)) u_piso (
    .clk(clk), .rst(rst), .sl(sl), .shift_en(tick), .pdata(data), .sout(piso_mux));

  mux2 #(.W(CARRIER_W)) u_mux (
    .sel(piso_mux), .d0(carrier_f2), .d1(carrier_f1), .y(bfsk_signal));

endmodule
