// clkdiv: free-running divider that makes the slow clocks of the processor
// array from the board clock.
//
// A binary counter runs on mclk; two of its bits are brought out as clocks.
// Bit n toggles every 2**n input cycles, so it is a square wave at
// f_mclk / 2**(n+1). With the 50 MHz oscillator of the Spartan-3E and
// Virtex-5 evaluation boards, bit 17 gives 190.7 Hz (clk190) and bit 19
// gives 47.7 Hz (clk48), slow enough to follow results on the board LEDs.
//
// Interface: mclk in, clr asynchronous active-high reset of the counter,
// clk190 and clk48 out, both starting low after clr.
//
// Only the names clk190 and clk48 and their use (clk190 clocks the array)
// come from the original top level; the counter, the tap positions derived
// from those names and the 50 MHz assumption are this design's own.
module clkdiv #(
  parameter int unsigned CLK190_BIT = 17,
  parameter int unsigned CLK48_BIT  = 19
) (
  input  logic mclk,
  input  logic clr,
  output logic clk190,
  output logic clk48
);

  localparam int unsigned W = (CLK190_BIT > CLK48_BIT ? CLK190_BIT : CLK48_BIT) + 1;

  logic [W-1:0] q;

  always_ff @(posedge mclk or posedge clr) begin
    if (clr) q <= '0;
    else     q <= q + 1'b1;
  end

  assign clk190 = q[CLK190_BIT];
  assign clk48  = q[CLK48_BIT];

endmodule
