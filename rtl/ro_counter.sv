// ro_counter -- pulse counter of one ring oscillator in the RO PUF.
//
// The counter is clocked by the ring oscillator's output itself and goes up
// by one on every rising edge (every "1" the oscillator produces). It stops
// at its maximum limit 2^COUNT_W - 1 and then raises full, which is the
// signal the comparator races against the other counter's. clr resets it
// asynchronously; the key generator raises clr only while the oscillators are
// stopped, so no oscillator edge can arrive while clr is released.
// Counting on the oscillator edges and the saturating limit follow the
// original description; the width is this design's choice (none is given).
//
// Interface: ro_clk (oscillator output), clr (async, active high),
// count, full. Timing: full rises on the 2^COUNT_W - 1-th rising edge.
module ro_counter #(
  parameter int unsigned COUNT_W = 10
) (
  input  logic               ro_clk,
  input  logic               clr,
  output logic [COUNT_W-1:0] count,
  output logic               full
);
  timeunit 1ns;
  timeprecision 1ps;

  assign full = &count;

  always_ff @(posedge ro_clk or posedge clr) begin
    if (clr)        count <= '0;
    else if (!full) count <= count + 1'b1;
  end

endmodule
