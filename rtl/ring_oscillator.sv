// ring_oscillator -- BEHAVIOURAL MODEL, not synthesizable: an N-stage ring
// oscillator whose loop is opened and closed by its in-challenge input.
//
// In silicon this is an enable gate followed by a chain of inverters fed back
// to the gate, an odd number of inversions in all; its frequency depends on
// the delays that fabrication gives to each gate and wire. The model replaces
// that loop by a delay: while challenge is 1 the output toggles every
// STAGES * STAGE_DELAY_PS picoseconds (one trip round the loop), starting from
// 0. While challenge is 0 the loop is open and the output rests at 0 (it
// returns there at the end of the half period in progress). The stage delay is
// a parameter so that each instance can be given its own fabrication spread.
//
// Synthesis tools report a combinational loop through this model's toggle;
// that loop is the oscillator itself and is intended. On silicon the block is
// a hand-placed macro, not synthesized logic.
//
// Interface: challenge (enable) in, ro_out out.
module ring_oscillator #(
  parameter int unsigned STAGES         = 5,
  parameter int unsigned STAGE_DELAY_PS = 100
) (
  input  logic challenge,
  output logic ro_out
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam realtime HALF_PERIOD = real'(STAGES * STAGE_DELAY_PS) / 1000.0;

  initial ro_out = 1'b0;

  always begin
    wait (challenge);
    #(HALF_PERIOD);
    ro_out = challenge ? ~ro_out : 1'b0;
  end

endmodule
