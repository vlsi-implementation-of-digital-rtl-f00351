// digital_keying_top: the BASK, BFSK and BPSK modulators side by side.
//
// The three keyers are independent designs sharing only clk and rst; each has
// its own enable, shift/load control, PROM address and outputs. Each keyer
// reads a 16-bit word from its PROM, serialises it MSB first at one bit per
// N clocks, and keys a 16-bit sampled sine carrier with each bit:
//   BASK: 1 -> carrier, 0 -> zero
//   BFSK: 1 -> carrier F1, 0 -> carrier F2
//   BPSK: 1 -> inverted (180-degree) carrier, 0 -> carrier
// Outputs are 16-bit offset-binary samples, one per clock. The bit periods
// default to 1000, 4000 and 2000 clocks for BASK, BFSK and BPSK.
// Putting the three keyers in one top is this design's own choice.
module digital_keying_top
  import keying_pkg::*;
#(
  parameter int unsigned N_ASK = 1000,
  parameter int unsigned N_FSK = 4000,
  parameter int unsigned N_PSK = 2000
) (
  input  logic               clk,
  input  logic               rst,
  // BASK
  input  logic               ask_en,
  input  logic               ask_sl,
  input  logic [PROM_AW-1:0] ask_address,
  output carrier_t           bask_signal,
  output logic               ask_bit,
  // BFSK
  input  logic               fsk_en,
  input  logic               fsk_sl,
  input  logic [PROM_AW-1:0] fsk_address,
  output carrier_t           bfsk_signal,
  output logic               fsk_bit,
  // BPSK
  input  logic               psk_en,
  input  logic               psk_sl,
  input  logic [PROM_AW-1:0] psk_address,
  output carrier_t           bpsk_signal,
  output logic               psk_bit
);

  bask_generator #(.N(N_ASK)) u_bask (
    .clk(clk), .rst(rst), .en(ask_en), .sl(ask_sl), .address(ask_address),
    .bask_signal(bask_signal), .data(), .piso_mux(ask_bit), .clk_div());

  bfsk_generator #(.N(N_FSK)) u_bfsk (
    .clk(clk), .rst(rst), .en(fsk_en), .sl(fsk_sl), .address(fsk_address),
    .bfsk_signal(bfsk_signal), .carrier_f1(), .carrier_f2(), .data(),
    .piso_mux(fsk_bit), .clk_div());

  bpsk_generator #(.N(N_PSK)) u_bpsk (
    .clk(clk), .rst(rst), .en(psk_en), .sl(psk_sl), .address(psk_address),
    .bpsk_signal(bpsk_signal), .carrier_0(), .carrier_180(), .data(),
    .piso_mux(psk_bit), .clk_div());

endmodule
