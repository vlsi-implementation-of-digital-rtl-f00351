// mux2: 2:1 multiplexer, the modulating element of all three keyers.
//
// y = d1 when sel is 1, y = d0 when sel is 0. Purely combinational; in the
// modulators sel is the serial data bit and d0/d1 are the two signals keyed
// between (ground/carrier, F2/F1, 0/180 degrees).
module mux2 #(
  parameter int W = keying_pkg::CARRIER_W
) (
  input  logic         sel,
  input  logic [W-1:0] d0,
  input  logic [W-1:0] d1,
  output logic [W-1:0] y
);

  always_comb y = sel ? d1 : d0;

endmodule
