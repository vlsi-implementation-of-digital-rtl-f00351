// prom: read-only store of the 16-bit modulating data words.
//
// A table of 2**AW words of DATA_W bits, fixed at elaboration by the INIT
// parameter (the "programming" of the PROM). The read is combinational: data
// follows addr in the same cycle, so the shift register can load it directly.
//
// Storing the 16-bit data in a PROM follows the modulators' description; the
// depth, the asynchronous read and the contents (other than word 1, which is
// 0011001100110011) are this design's own choices.
module prom
  import keying_pkg::*;
#(
  parameter int         AW = PROM_AW,
  parameter data_word_t INIT [2**AW] = PROM_INIT
) (
  input  logic [AW-1:0] addr,
  output data_word_t    data
);

  assign data = INIT[addr];

endmodule
