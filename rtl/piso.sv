// piso: parallel-in serial-out shift register.
//
// With sl low the register loads the parallel word on every clock and holds it
// there. With sl high it shifts left by one bit on each clock where shift_en
// is high, filling with 0. The serial output is the register's MSB, so the
// word leaves MSB first, one bit per shift.
//
// Interface: clk, rst (synchronous, clears the register), sl (0 = load,
// 1 = shift), shift_en (bit-rate strobe), pdata (parallel word), sout (serial
// bit). Timing: sout shows pdata[W-1] one clock after a load, and the next bit
// one clock after each strobe.
//
// The 16-bit parallel-to-serial conversion and the sl control follow the
// modulators' description; the meaning of sl's two values, MSB-first order,
// zero fill and reset behaviour are this design's own choices.
module piso #(
  parameter int W = keying_pkg::DATA_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         sl,
  input  logic         shift_en,
  input  logic [W-1:0] pdata,
  output logic         sout
);

  logic [W-1:0] sreg;

  always_ff @(posedge clk) begin
    if (rst)           sreg <= '0;
    else if (!sl)      sreg <= pdata;
    else if (shift_en) sreg <= {sreg[W-2:0], 1'b0};
  end

  assign sout = sreg[W-1];

endmodule
