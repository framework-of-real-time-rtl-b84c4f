// generic_counter: N-bit counter that advances once every second clock,
// with synchronous clear.
//
// An enable flip-flop toggles every clock; the count increments on the
// clocks where it is set, so count[k] has a period of 2^(k+2) input clocks.
// Counting at half the input clock follows the source's counter description;
// the width N (8) and the synchronous clear are this design's choices. In
// the top level, count[3] of a counter on the 200 MHz clock is the 6.25 MHz
// sample-rate clock (period 32 clocks).
//
// Timing: count changes on every second rising edge after clr is released;
// clr forces count and the enable to zero at the next edge.
module generic_counter #(
  parameter int N = 8
) (
  input  logic         clk,
  input  logic         clr,
  output logic [N-1:0] count
);
  logic en;
  always_ff @(posedge clk) begin
    if (clr) begin
      en    <= 1'b0;
      count <= '0;
    end else begin
      en <= ~en;
      if (en) count <= count + 1'b1;
    end
  end
endmodule
