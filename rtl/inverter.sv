// inverter: bitwise inverter giving the 180-degree carrier for BPSK.
//
// y = ~a. On an offset-binary sample x this gives 65535 - x, the sample
// mirrored about mid-scale: the same sine shifted by 180 degrees (within one
// LSB). Purely combinational.
module inverter #(
  parameter int W = keying_pkg::CARRIER_W
) (
  input  logic [W-1:0] a,
  output logic [W-1:0] y
);

  always_comb y = ~a;

endmodule
