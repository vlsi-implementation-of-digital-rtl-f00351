// bit_clock_div: bit-rate divider for the serial data.
//
// A counter runs from 0 to N-1 and issues a one-clock strobe, tick, on the
// clock where it wraps, so tick is high once every N clocks: the bit period of
// the modulated signal is N system clocks. The strobe is used as a clock
// enable, so the whole modulator stays in one clock domain. clk_div is a
// square wave that toggles as each tick rises (period 2*N clocks) for observation.
//
// Interface: clk, rst and clr (synchronous, active high: counter to 0),
// tick (strobe), clk_div (square wave). Timing: after rst or clr, the first
// tick comes N clocks later.
//
// The divide ratio N is the divider's parameter; its use as a one-clock strobe
// instead of a derived clock, and clr, are this design's own choices.
module bit_clock_div #(
  parameter int unsigned N = 1000
) (
  input  logic clk,
  input  logic rst,
  input  logic clr,
  output logic tick,
  output logic clk_div
);

  localparam int CW = (N > 1) ? $clog2(N) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (cnt == CW'(N - 1)) begin
      cnt  <= '0;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      tick <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst)                             clk_div <= 1'b0;
    else if (!clr && cnt == CW'(N - 1)) clk_div <= ~clk_div;
  end

  initial assert (N >= 1) else $error("bit_clock_div: N must be at least 1");

endmodule
